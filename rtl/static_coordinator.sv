// static_coordinator: scheduler of the simulation cycles (static part of the
// coordinator).
//
// A cycle starts with a one-clock step pulse on the control bus together
// with tn_min, the time of the cycle, which stays on the bus until the next
// step. Each component answers with stepped, its new next event time tn and
// tn_valid (0 = infinite). Several areas may raise stepped together; a
// round-robin arbiter accepts one per clock and answers it with ack_stepped
// in the same cycle, and the tn and tn_valid values are written into a
// table with one entry per reconfigurable area. When the number of occupied
// areas that have reported equals n_components (given by the dynamic
// coordinator), the table is scanned one entry per clock for the smallest
// valid tn of an occupied area, and the next cycle starts with it. If no
// entry is valid (every component is passive) the simulation stops and
// halted rises. area_loaded clears the entry of an area whose component was
// just (re)configured, so its start-up report is awaited; start holds the
// first cycle back until the dynamic coordinator has set up the initial
// connections, and run low suspends the scheduling between cycles.
// Cycle protocol, table and sequential scan follow the platform description;
// the per-area table indexing, the round-robin order and start/run/halted
// are this design's choices. The time of the first cycle is tn_min = 0 held
// from reset, which is what the components read as their creation time.
module static_coordinator
  import prdevs_pkg::*;
#(
  parameter int N_AREAS = 2
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       start,
  input  logic                       run,
  input  ctrl_up_t                   ctrl_up      [N_AREAS],
  output logic [N_AREAS-1:0]         ack_stepped,
  output ctrl_down_t                 ctrl_down,
  input  logic [N_AREAS-1:0]         occupied,
  input  logic [$clog2(N_AREAS+1)-1:0] n_components,
  input  logic [N_AREAS-1:0]         area_loaded,
  output logic                       halted,
  output logic [31:0]                cycles
);
  localparam int IW = $clog2(N_AREAS > 1 ? N_AREAS : 2);
  localparam int CW = $clog2(N_AREAS + 1);

  typedef enum logic [1:0] {COLLECT, SCAN, DECIDE, HALT} st_t;
  st_t st;

  tn_t               tab_tn    [N_AREAS];
  logic [N_AREAS-1:0] tab_valid;
  logic [N_AREAS-1:0] reported;
  logic [IW-1:0]     idx;
  tn_t               min_tn;
  logic              min_valid;

  logic [N_AREAS-1:0] stepped_v;
  logic [N_AREAS-1:0] grant;
  logic [IW-1:0]      gidx;
  logic [CW-1:0]      n_reported;
  logic               all_reported;

  always_comb begin
    n_reported = '0;
    for (int i = 0; i < N_AREAS; i++) begin
      stepped_v[i] = ctrl_up[i].stepped;
      n_reported   = n_reported + CW'(reported[i] & occupied[i]);
    end
  end
  assign all_reported = (n_reported == n_components);

  rr_arbiter #(.N(N_AREAS)) u_arb (
    .clk, .rst_n, .req(stepped_v), .advance(st == COLLECT), .grant, .grant_idx(gidx)
  );
  assign ack_stepped = (st == COLLECT) ? grant : '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st             <= COLLECT;
      ctrl_down      <= '0;
      tab_valid      <= '0;
      reported       <= '0;
      idx            <= '0;
      min_tn         <= '0;
      min_valid      <= 1'b0;
      cycles         <= '0;
      for (int i = 0; i < N_AREAS; i++) tab_tn[i] <= '0;
    end else begin
      ctrl_down.step <= 1'b0;
      unique case (st)
        COLLECT: begin
          if (grant != '0) begin
            tab_tn[gidx]    <= ctrl_up[gidx].tn;
            tab_valid[gidx] <= ctrl_up[gidx].tn_valid;
            reported[gidx]  <= 1'b1;
          end else if (all_reported && start && !ctrl_down.step) begin
            st        <= SCAN;
            idx       <= '0;
            min_valid <= 1'b0;
          end
        end
        SCAN: begin
          if (occupied[idx] && tab_valid[idx] && (!min_valid || tab_tn[idx] < min_tn)) begin
            min_tn    <= tab_tn[idx];
            min_valid <= 1'b1;
          end
          if (int'(idx) == N_AREAS - 1) st <= DECIDE;
          else                          idx <= idx + 1'b1;
        end
        DECIDE: begin
          if (!min_valid) begin
            st <= HALT;
          end else if (run) begin
            ctrl_down.step   <= 1'b1;
            ctrl_down.tn_min <= min_tn;
            reported         <= '0;
            cycles           <= cycles + 1;
            st               <= COLLECT;
          end
        end
        default: st <= HALT;
      endcase
      // a freshly configured area reports anew
      for (int i = 0; i < N_AREAS; i++)
        if (area_loaded[i]) reported[i] <= 1'b0;
    end
  end

  assign halted = (st == HALT);

  // A time-ordered simulation never goes back in time.
  assert property (@(posedge clk) disable iff (!rst_n)
                   ctrl_down.step |-> !(ctrl_down.tn_min < $past(ctrl_down.tn_min)));
endmodule
