// comm_input_block: input-side communication block of one input port.
//
// It stores the full identifier of the output port this input is connected
// to (remote_id, 0 = not connected) in a writable register. A connection
// update broadcast whose in_id equals this port's own full id overwrites
// remote_id; a removed connection carries out_id = 0. Each broadcast message
// whose sender equals a non-zero remote_id is captured in a one-message
// buffer and input_available rises on the next clock. The component clears
// the flag with a one-cycle input_read. A message arriving in the same cycle
// as input_read is kept (the flag stays set); a message that arrives while the
// buffer is still full replaces the older one and pulses overrun.
// The filtering, the buffer and the update rule follow the platform
// description; the replace-on-overrun policy and the overrun flag are this
// design's choice.
module comm_input_block
  import prdevs_pkg::*;
#(
  parameter port_id_t PORT = 4'd1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  comp_id_t  own_comp_id,
  input  msg_t      bus_msg,
  input  conn_upd_t conn_upd,
  input  logic      input_read,
  output logic      input_available,
  output value_t    input_value,
  output full_id_t  input_sender,
  output full_id_t  remote_id,
  output logic      overrun
);
  full_id_t own_id;
  logic     accept;

  assign own_id = '{comp: own_comp_id, port: PORT};
  assign accept = bus_msg.valid && (remote_id.comp != '0) && (bus_msg.sender == remote_id);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      remote_id       <= '0;
      input_available <= 1'b0;
      input_value     <= '0;
      input_sender    <= '0;
      overrun         <= 1'b0;
    end else begin
      if (conn_upd.update_connection && conn_upd.in_id == own_id && own_comp_id != '0)
        remote_id <= conn_upd.out_id;
      overrun <= accept && input_available && !input_read;
      if (accept) begin
        input_available <= 1'b1;
        input_value     <= bus_msg.value;
        input_sender    <= bus_msg.sender;
      end else if (input_read) begin
        input_available <= 1'b0;
      end
    end
  end
endmodule
