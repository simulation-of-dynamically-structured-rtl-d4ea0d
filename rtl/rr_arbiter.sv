// rr_arbiter: round-robin arbiter used wherever several reconfigurable areas
// share one bus (stepped reports, communication bus, structure-change calls).
//
// grant is one-hot and combinational from req. The search starts one place
// after the last granted requester, so no requester waits for more than N-1
// grants. The pointer moves only on a clock edge where advance is high and a
// grant is given. The bus protocol only says one requester is served at a
// time; the round-robin order is this design's choice.
module rr_arbiter #(
  parameter int N = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx
);
  localparam int IW = $clog2(N > 1 ? N : 2);
  logic [IW-1:0] last_q;

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int k = 1; k <= N; k++) begin
      if (req[(int'(last_q) + k) % N] && grant == '0) begin
        grant[(int'(last_q) + k) % N] = 1'b1;
        grant_idx                     = IW'((int'(last_q) + k) % N);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                     last_q <= IW'(N - 1);
    else if (advance && grant != '0) last_q <= grant_idx;
  end
endmodule
