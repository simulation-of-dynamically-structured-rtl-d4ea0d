// prdevs_top: FPGA platform for simulating a dynamic-structure DEVS model,
// loaded with the generator/counter example.
//
// The static part of the device is the coordinator and the multi-bus; the
// model's atomic components live in N_AREAS partially reconfigurable areas,
// at most one component per area, and the model is flat (no coupled
// components below the top). The multi-bus has three parts, all connected to
// every area whether or not the model connects them:
//   control bus        step/tn_min broadcast, stepped/tn/tn_valid + ack_stepped per area
//   communication bus  broadcast messages, one per clock, filtered by the
//                      input communication blocks
//   SC bus             structure-change calls per area, sc_done/sc_return,
//                      and the broadcast connection update
// Adding or removing a component is a partial reconfiguration: the
// coordinator emits prc_trigger with a bitstream id for the external partial
// reconfiguration controller, which must answer prc_done when the area holds
// its new configuration. area_config is the configuration the controller has
// actually loaded in each area (it selects which library component the area
// model runs) and must be set to the initial model, generator1 in area 1
// (id 1) and counter in area 2 (id 2), from reset on. run low suspends the
// simulation between cycles. The remaining outputs are for observation:
// current simulation time and step, halted, the number of cycles, the
// communication bus, connection updates, the area table and the counter's
// coin count. Structure and buses follow the platform description; the
// exposed controller handshake and the observation outputs are this
// design's.
module prdevs_top
  import prdevs_pkg::*;
#(
  parameter int N_AREAS = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  input  comp_type_t         area_config  [N_AREAS],
  output logic               prc_trigger,
  output bs_id_t             prc_bitstream_id,
  input  logic               prc_done,
  output ctrl_down_t         ctrl_down,
  output logic               halted,
  output logic [31:0]        cycles,
  output msg_t               bus_msg,
  output conn_upd_t          conn_upd,
  output logic [N_AREAS-1:0] occupied,
  output comp_type_t         area_type    [N_AREAS],
  output comp_id_t           area_comp_id [N_AREAS],
  output logic [15:0]        coin_count,
  output logic               overrun
);
  // Initial model: generator1 in the first area, the counter in the second,
  // generator1.EVENT -> counter.EVENT. Further areas start blank.
  typedef comp_type_t type_arr_t [N_AREAS];
  typedef comp_id_t   id_arr_t   [N_AREAS];
  function automatic type_arr_t init_types();
    for (int i = 0; i < N_AREAS; i++)
      init_types[i] = (i == 0) ? CT_GEN1 : (i == 1) ? CT_COUNTER : CT_BLANK;
  endfunction
  function automatic id_arr_t init_ids();
    for (int i = 0; i < N_AREAS; i++)
      init_ids[i] = (i < 2) ? comp_id_t'(i + 1) : '0;
  endfunction
  localparam type_arr_t INIT_TYPE = init_types();
  localparam id_arr_t   INIT_ID   = init_ids();

  ctrl_up_t           ctrl_up [N_AREAS];
  logic [N_AREAS-1:0] ack_stepped;
  msg_t               msg_req [N_AREAS];
  logic [N_AREAS-1:0] msg_grant;
  sc_req_t            sc_req  [N_AREAS];
  logic [N_AREAS-1:0] sc_done;
  comp_id_t           sc_return;
  logic [N_AREAS-1:0] decouple, area_rst;
  logic [15:0]        count   [N_AREAS];
  logic [N_AREAS-1:0] ovr;

  coordinator #(
    .N_AREAS(N_AREAS), .INIT_TYPE(INIT_TYPE), .INIT_ID(INIT_ID)
  ) u_coord (
    .clk, .rst_n, .run, .ctrl_down, .ctrl_up, .ack_stepped,
    .sc_req, .sc_done, .sc_return, .conn_upd,
    .decouple, .area_rst, .occupied, .area_type, .area_comp_id,
    .prc_trigger, .prc_bitstream_id, .prc_done, .halted, .cycles
  );

  comm_bus #(.N(N_AREAS)) u_bus (
    .clk, .rst_n, .req(msg_req), .grant(msg_grant), .bus_msg
  );

  for (genvar a = 0; a < N_AREAS; a++) begin : g_area
    reconfigurable_area u_area (
      .clk, .rst_n,
      .loaded_type(area_config[a]), .area_rst(area_rst[a]), .decouple(decouple[a]),
      .own_comp_id(area_comp_id[a]),
      .ctrl_down, .ack_stepped(ack_stepped[a]), .ctrl_up(ctrl_up[a]),
      .bus_msg, .msg_req(msg_req[a]), .msg_grant(msg_grant[a]),
      .sc_req(sc_req[a]), .sc_done(sc_done[a]), .sc_return, .conn_upd,
      .count(count[a]), .overrun(ovr[a])
    );
  end

  always_comb begin
    coin_count = '0;
    for (int a = 0; a < N_AREAS; a++) coin_count = coin_count | count[a];
  end
  assign overrun = |ovr;
endmodule
