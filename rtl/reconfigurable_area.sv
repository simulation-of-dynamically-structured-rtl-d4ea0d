// reconfigurable_area: one partially reconfigurable area of the platform and
// its decoupler.
//
// An area holds zero or one atomic component at a time. On the FPGA, which
// one is decided by the partial bitstream last loaded into it; here the
// input loaded_type stands for that configuration, and the area contains one
// instance of every component type of the library, of which only the loaded
// one is out of reset and connected. A blank area drives nothing. This is a
// simulation model of partial reconfiguration: a synthesized area would hold
// all library types at once, whereas on the device each type is a separate
// partial bitstream of the same area.
//
// area_rst holds the component in reset (asserted by the dynamic coordinator
// during a reconfiguration and released when it ends, which starts the new
// component in its INIT state). decouple gates all area outputs through the
// decoupler. own_comp_id is the identifier the coordinator gave the
// component. All bus signals are those of the multi-bus: control bus
// (ctrl_down, ack_stepped, ctrl_up), communication bus (bus_msg, msg_req,
// msg_grant) and SC bus (sc_req, sc_done, sc_return, conn_upd).
module reconfigurable_area
  import prdevs_pkg::*;
#(
  parameter int unsigned GEN1_PERIOD = 2,
  parameter int unsigned GEN2_PERIOD = 3,
  parameter int unsigned SWAP1_COUNT = 10,
  parameter int unsigned SWAP2_COUNT = 20
) (
  input  logic        clk,
  input  logic        rst_n,
  input  comp_type_t  loaded_type,
  input  logic        area_rst,
  input  logic        decouple,
  input  comp_id_t    own_comp_id,
  input  ctrl_down_t  ctrl_down,
  input  logic        ack_stepped,
  output ctrl_up_t    ctrl_up,
  input  msg_t        bus_msg,
  output msg_t        msg_req,
  input  logic        msg_grant,
  output sc_req_t     sc_req,
  input  logic        sc_done,
  input  comp_id_t    sc_return,
  input  conn_upd_t   conn_upd,
  output logic [15:0] count,     // counter observation (0 unless a counter is loaded)
  output logic        overrun
);
  logic rst_g1_n, rst_g2_n, rst_ct_n;
  assign rst_g1_n = rst_n && !area_rst && (loaded_type == CT_GEN1);
  assign rst_g2_n = rst_n && !area_rst && (loaded_type == CT_GEN2);
  assign rst_ct_n = rst_n && !area_rst && (loaded_type == CT_COUNTER);

  ctrl_up_t g1_up, g2_up, ct_up;
  msg_t     g1_msg, g2_msg;
  sc_req_t  ct_sc;
  logic [15:0] ct_count;
  logic [3:0]  ct_phase;
  logic        ct_overrun;
  full_id_t    ct_remote;
  logic        g1_emit, g2_emit;

  generator_component #(.PERIOD(GEN1_PERIOD)) u_gen1 (
    .clk, .rst_n(rst_g1_n), .own_comp_id, .ctrl_down, .ack_stepped,
    .ctrl_up(g1_up), .msg_req(g1_msg), .msg_grant, .emitting(g1_emit)
  );
  generator_component #(.PERIOD(GEN2_PERIOD)) u_gen2 (
    .clk, .rst_n(rst_g2_n), .own_comp_id, .ctrl_down, .ack_stepped,
    .ctrl_up(g2_up), .msg_req(g2_msg), .msg_grant, .emitting(g2_emit)
  );
  counter_component #(.SWAP1_COUNT(SWAP1_COUNT), .SWAP2_COUNT(SWAP2_COUNT), .COUNT_W(16)) u_counter (
    .clk, .rst_n(rst_ct_n), .own_comp_id, .ctrl_down, .ack_stepped,
    .ctrl_up(ct_up), .bus_msg, .conn_upd, .sc_req(ct_sc), .sc_done, .sc_return,
    .count(ct_count), .phase(ct_phase), .overrun(ct_overrun), .remote_id(ct_remote)
  );

  // Outputs of the loaded component (the reconfigurable partition's pins).
  ctrl_up_t rp_up;
  msg_t     rp_msg;
  sc_req_t  rp_sc;
  always_comb begin
    rp_up  = '0;
    rp_msg = '0;
    rp_sc  = '0;
    unique case (loaded_type)
      CT_GEN1:    begin rp_up = g1_up; rp_msg = g1_msg; end
      CT_GEN2:    begin rp_up = g2_up; rp_msg = g2_msg; end
      CT_COUNTER: begin rp_up = ct_up; rp_sc  = ct_sc;  end
      default:    ;
    endcase
    if (area_rst) begin
      rp_up  = '0;
      rp_msg = '0;
      rp_sc  = '0;
    end
  end

  decoupler u_dec (
    .decouple,
    .rp_ctrl_up(rp_up), .rp_msg_req(rp_msg), .rp_sc_req(rp_sc),
    .st_ctrl_up(ctrl_up), .st_msg_req(msg_req), .st_sc_req(sc_req)
  );

  assign count   = (loaded_type == CT_COUNTER) ? ct_count : '0;
  assign overrun = (loaded_type == CT_COUNTER) && ct_overrun;
endmodule
