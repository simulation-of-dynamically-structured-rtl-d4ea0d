// counter_component: atomic DEVS counter of the example library, the one
// component of the example that changes the model's structure.
//
// DEVS model: phases s0..s9 plus the stored sender (component, port) and a
// coin count. s0 has an infinite time advance and an external transition: a
// coin on input EVENT moves it to s1 and increments count, and the sender of
// the coin is remembered. All other phases have time advance 0. From s1 the
// internal transition goes back to s0, or to s2 when count = SWAP1_COUNT, or
// to s6 when count = SWAP2_COUNT. s2..s5 swap generator1 for generator2 and
// s6..s9 swap back, one structure-change call per phase, emitted when the
// phase is imminent and followed by the internal transition to the next
// phase (s5 and s9 return to s0):
//   s2/s6 removeConnection(sender.EVENT -> self.EVENT)
//   s3/s7 removeComponent(sender)
//   s4/s8 addComponent(generator2 / generator1); the returned id becomes the sender
//   s5/s9 addConnection(sender.EVENT -> self.EVENT)
//
// Low-level FSM: WAIT_STEP -> BEGIN_STEP on step. BEGIN_STEP runs the branch
// of the current phase: for s0 it tests input_available (external
// transition, input_read pulses for one cycle); for the other phases it tests
// imminence (tn_i == tn_min). An imminent s2..s9 goes to SC_CALL, which holds
// the call on the SC bus until sc_done, then the internal transition is
// applied. Every branch ends in END_STEP, which holds stepped, tn and
// tn_valid (0 in s0, meaning infinity) until ack_stepped. After reset the
// component reports its initial time through INIT -> END_STEP like the
// generators. The phases, transitions and calls follow the example model of
// the platform description; the FSM encoding, the start-up report and the
// widths are this design's choices.
module counter_component
  import prdevs_pkg::*;
#(
  parameter int unsigned SWAP1_COUNT = 10,
  parameter int unsigned SWAP2_COUNT = 20,
  parameter int          COUNT_W     = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  comp_id_t           own_comp_id,
  input  ctrl_down_t         ctrl_down,
  input  logic               ack_stepped,
  output ctrl_up_t           ctrl_up,
  input  msg_t               bus_msg,
  input  conn_upd_t          conn_upd,
  output sc_req_t            sc_req,
  input  logic               sc_done,
  input  comp_id_t           sc_return,
  output logic [COUNT_W-1:0] count,
  output logic [3:0]         phase,
  output logic               overrun,
  output full_id_t           remote_id
);
  typedef enum logic [2:0] {INIT, WAIT_STEP, BEGIN_STEP, SC_CALL, END_STEP} fsm_t;
  typedef enum logic [3:0] {S0, S1, S2, S3, S4, S5, S6, S7, S8, S9} ds_t;

  fsm_t     state;
  ds_t      ds;
  tn_t      tn_i;
  logic     tn_valid_i;
  full_id_t sender;

  logic     input_read;
  logic     input_available;
  value_t   input_value;
  full_id_t input_sender;

  comm_input_block #(.PORT(COUNTER_EVENT_PORT)) u_in (
    .clk, .rst_n, .own_comp_id, .bus_msg, .conn_upd, .input_read,
    .input_available, .input_value, .input_sender, .remote_id, .overrun
  );

  // Internal transition function.
  function automatic ds_t delta_int(ds_t s, logic [COUNT_W-1:0] c);
    unique case (s)
      S1:      delta_int = (c == COUNT_W'(SWAP1_COUNT)) ? S2 :
                           (c == COUNT_W'(SWAP2_COUNT)) ? S6 : S0;
      S2:      delta_int = S3;
      S3:      delta_int = S4;
      S4:      delta_int = S5;
      S6:      delta_int = S7;
      S7:      delta_int = S8;
      S8:      delta_int = S9;
      default: delta_int = S0;  // S5, S9
    endcase
  endfunction

  logic imminent;
  assign imminent   = tn_valid_i && (tn_i == ctrl_down.tn_min);
  assign input_read = (state == BEGIN_STEP) && (ds == S0) && input_available;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= INIT;
      ds         <= S0;
      tn_i       <= '0;
      tn_valid_i <= 1'b0;
      sender     <= '0;
      count      <= '0;
    end else begin
      unique case (state)
        INIT:       state <= END_STEP;
        WAIT_STEP:  if (ctrl_down.step) state <= BEGIN_STEP;
        BEGIN_STEP: begin
          state <= END_STEP;
          if (ds == S0) begin
            if (input_available) begin       // external transition
              ds         <= S1;
              count      <= count + 1'b1;
              sender     <= input_sender;
              tn_i       <= ctrl_down.tn_min;  // time advance 0
              tn_valid_i <= 1'b1;
            end
          end else if (imminent) begin
            if (ds == S1) begin              // internal transition only
              ds         <= delta_int(ds, count);
              tn_valid_i <= (delta_int(ds, count) != S0);
              tn_i       <= ctrl_down.tn_min;
            end else begin
              state <= SC_CALL;              // structure change first
            end
          end
        end
        SC_CALL: if (sc_done) begin
          if (ds == S4 || ds == S8) sender <= '{comp: sc_return, port: GEN_EVENT_PORT};
          ds         <= delta_int(ds, count);
          tn_valid_i <= (delta_int(ds, count) != S0);
          tn_i       <= ctrl_down.tn_min;
          state      <= END_STEP;
        end
        END_STEP: if (ack_stepped) state <= WAIT_STEP;
        default:  state <= WAIT_STEP;
      endcase
    end
  end

  // Structure-change call of the current phase.
  always_comb begin
    sc_req            = '0;
    sc_req.sc         = (state == SC_CALL);
    sc_req.compo_id_1 = sender.comp;
    sc_req.port_id_1  = sender.port;
    sc_req.compo_id_2 = own_comp_id;
    sc_req.port_id_2  = COUNTER_EVENT_PORT;
    unique case (ds)
      S2, S6: sc_req.sc_type = SC_REMOVE_CONNECTION;
      S3, S7: sc_req.sc_type = SC_REMOVE_COMPONENT;
      S4, S8: sc_req.sc_type = SC_ADD_COMPONENT;
      default: sc_req.sc_type = SC_ADD_CONNECTION;  // S5, S9
    endcase
    sc_req.comp_type = (ds == S8) ? CT_GEN1 : CT_GEN2;
  end

  assign ctrl_up = '{stepped: (state == END_STEP), tn: tn_i, tn_valid: tn_valid_i};
  assign phase   = 4'(ds);
endmodule
