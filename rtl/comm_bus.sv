// comm_bus: the communication bus of the multi-bus.
//
// Every reconfigurable area has one request channel (its communication block
// already multiplexes the component's output ports). Messages are broadcast:
// the granted request is copied onto bus_msg in the same clock cycle and every
// input communication block sees it, keeping it only if the sender matches
// the output port it is connected to. One message is carried per clock cycle;
// grant is combinational and the requester must hold its request until it is
// granted. Broadcasting to all areas follows the platform description; the
// round-robin choice between simultaneous requests is this design's.
module comm_bus
  import prdevs_pkg::*;
#(
  parameter int N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  msg_t         req   [N],
  output logic [N-1:0] grant,
  output msg_t         bus_msg
);
  logic [N-1:0] req_v;
  logic [$clog2(N > 1 ? N : 2)-1:0] idx;

  always_comb
    for (int i = 0; i < N; i++) req_v[i] = req[i].valid;

  rr_arbiter #(.N(N)) u_arb (
    .clk, .rst_n, .req(req_v), .advance(1'b1), .grant, .grant_idx(idx)
  );

  always_comb begin
    bus_msg = '0;
    if (grant != '0) begin
      bus_msg       = req[idx];
      bus_msg.valid = 1'b1;
    end
  end

  assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));
endmodule
