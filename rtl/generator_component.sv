// generator_component: atomic DEVS generator of the example library.
//
// The DEVS model has a single phase s0 with time advance PERIOD: whenever it
// is imminent it emits EVENT = true on its output port and re-enters s0.
// generator1 uses PERIOD = 2 and generator2 PERIOD = 3.
//
// The model is run by the low-level state machine shared by all atomic
// components: WAIT_STEP idles until the coordinator's step pulse; BEGIN_STEP
// compares the local next event time tn_i with tn_min; if equal, EMIT holds
// output_available until the communication block reports output_written,
// then the internal transition sets tn_i = tn_min + PERIOD (output first,
// state change second); END_STEP holds stepped with tn_i until ack_stepped.
// Coming out of reset (power-up or a fresh partial reconfiguration) the
// component first goes to INIT, which takes the time on the control bus as
// its last event time (tn_i = tn_min + PERIOD) and reports it through
// END_STEP without waiting for a step, so a component added in the middle of
// a cycle is counted by the coordinator. That start-up report is this
// design's choice; the rest follows the platform description.
module generator_component
  import prdevs_pkg::*;
#(
  parameter int unsigned PERIOD = 2
) (
  input  logic       clk,
  input  logic       rst_n,
  input  comp_id_t   own_comp_id,
  input  ctrl_down_t ctrl_down,
  input  logic       ack_stepped,
  output ctrl_up_t   ctrl_up,
  output msg_t       msg_req,
  input  logic       msg_grant,
  output logic       emitting     // EMIT state, for observation
);
  typedef enum logic [2:0] {INIT, WAIT_STEP, BEGIN_STEP, EMIT, END_STEP} fsm_t;
  fsm_t state;
  tn_t  tn_i;

  logic   out_avail;
  logic   out_written;
  value_t out_value [1];

  assign out_avail    = (state == EMIT);
  assign out_value[0] = value_t'(1);  // EVENT = true
  assign emitting     = out_avail;

  comm_output_block #(.N_OUT(1), .FIRST_PORT(GEN_EVENT_PORT)) u_out (
    .own_comp_id,
    .output_available(out_avail),
    .output_value(out_value),
    .output_handled(msg_grant),
    .output_written(out_written),
    .bus_req(msg_req)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= INIT;
      tn_i  <= '0;
    end else begin
      unique case (state)
        INIT: begin
          tn_i  <= ctrl_down.tn_min + tn_t'(PERIOD);
          state <= END_STEP;
        end
        WAIT_STEP:  if (ctrl_down.step) state <= BEGIN_STEP;
        BEGIN_STEP: state <= (tn_i == ctrl_down.tn_min) ? EMIT : END_STEP;
        EMIT: if (out_written) begin
          tn_i  <= ctrl_down.tn_min + tn_t'(PERIOD);
          state <= END_STEP;
        end
        END_STEP: if (ack_stepped) state <= WAIT_STEP;
        default: state <= WAIT_STEP;
      endcase
    end
  end

  assign ctrl_up = '{stepped: (state == END_STEP), tn: tn_i, tn_valid: 1'b1};
endmodule
