// comm_output_block: output-side communication block of a component.
//
// The component raises output_available[j] with output_value[j] for output
// port j and holds them until output_written[j]. The block selects the lowest
// numbered pending port, requests the communication bus with the port's full
// id (own component id, port number FIRST_PORT + j) as sender, and returns output_written[j]
// in the cycle the bus grants the request. Requesting the bus and
// multiplexing several outputs are the block's duties in the platform
// description; the fixed lowest-port-first order is this design's choice.
module comm_output_block
  import prdevs_pkg::*;
#(
  parameter int       N_OUT              = 1,
  parameter port_id_t FIRST_PORT         = 4'd1
) (
  input  comp_id_t         own_comp_id,
  input  logic [N_OUT-1:0] output_available,
  input  value_t           output_value [N_OUT],
  input  logic             output_handled,   // bus grant
  output logic [N_OUT-1:0] output_written,
  output msg_t             bus_req
);
  always_comb begin
    bus_req        = '0;
    output_written = '0;
    for (int j = N_OUT - 1; j >= 0; j--) begin
      if (output_available[j]) begin
        bus_req.valid  = 1'b1;
        bus_req.sender = '{comp: own_comp_id, port: FIRST_PORT + port_id_t'(j)};
        bus_req.value  = output_value[j];
      end
    end
    for (int j = 0; j < N_OUT; j++) begin
      if (output_available[j] && bus_req.sender.port == FIRST_PORT + port_id_t'(j) && output_written == '0)
        output_written[j] = output_handled;
    end
  end
endmodule
