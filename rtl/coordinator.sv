// coordinator: the single static controller of the platform, made of a
// static coordinator (simulation-cycle scheduling over the control bus) and a
// dynamic coordinator (structure-change calls over the SC bus and partial
// reconfiguration requests). The dynamic part tells the static part which
// areas are occupied, how many components exist and when an area has just
// received a new component; the static part starts scheduling once the
// dynamic part has broadcast the initial connections. The split into two
// parts and their roles follow the platform description; the signals
// between them are this design's.
module coordinator
  import prdevs_pkg::*;
#(
  parameter int         N_AREAS                     = 2,
  parameter comp_type_t INIT_TYPE [N_AREAS]         = '{CT_GEN1, CT_COUNTER},
  parameter comp_id_t   INIT_ID   [N_AREAS]         = '{8'd1, 8'd2},
  parameter int         N_INIT_CONN                 = 1,
  parameter full_id_t   INIT_CONN_OUT [N_INIT_CONN] = '{'{comp: 8'd1, port: 4'd1}},
  parameter full_id_t   INIT_CONN_IN  [N_INIT_CONN] = '{'{comp: 8'd2, port: 4'd1}},
  parameter comp_id_t   FIRST_FREE_ID               = 8'd3
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               run,
  // control bus
  output ctrl_down_t         ctrl_down,
  input  ctrl_up_t           ctrl_up      [N_AREAS],
  output logic [N_AREAS-1:0] ack_stepped,
  // SC bus
  input  sc_req_t            sc_req       [N_AREAS],
  output logic [N_AREAS-1:0] sc_done,
  output comp_id_t           sc_return,
  output conn_upd_t          conn_upd,
  // area management
  output logic [N_AREAS-1:0] decouple,
  output logic [N_AREAS-1:0] area_rst,
  output logic [N_AREAS-1:0] occupied,
  output comp_type_t         area_type    [N_AREAS],
  output comp_id_t           area_comp_id [N_AREAS],
  // partial reconfiguration controller
  output logic               prc_trigger,
  output bs_id_t             prc_bitstream_id,
  input  logic               prc_done,
  // status
  output logic               halted,
  output logic [31:0]        cycles
);
  logic [$clog2(N_AREAS+1)-1:0] n_components;
  logic [N_AREAS-1:0]           area_loaded;
  logic                         ready;

  static_coordinator #(.N_AREAS(N_AREAS)) u_static (
    .clk, .rst_n, .start(ready), .run, .ctrl_up, .ack_stepped, .ctrl_down,
    .occupied, .n_components, .area_loaded, .halted, .cycles
  );

  dynamic_coordinator #(
    .N_AREAS(N_AREAS), .INIT_TYPE(INIT_TYPE), .INIT_ID(INIT_ID),
    .N_INIT_CONN(N_INIT_CONN), .INIT_CONN_OUT(INIT_CONN_OUT), .INIT_CONN_IN(INIT_CONN_IN),
    .FIRST_FREE_ID(FIRST_FREE_ID)
  ) u_dynamic (
    .clk, .rst_n, .sc_req, .sc_done, .sc_return, .conn_upd,
    .prc_trigger, .prc_bitstream_id, .prc_done,
    .decouple, .area_rst, .occupied, .area_type, .area_comp_id,
    .n_components, .area_loaded, .ready
  );
endmodule
