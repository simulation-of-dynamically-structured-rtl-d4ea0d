// tb_static_coordinator: three areas with behavioural components that report
// random next event times (sometimes infinite) at random moments, often
// together. Checks: one ack_stepped per clock, only to a reporting area;
// step is a single-clock pulse; each new tn_min is the smallest valid tn of
// the occupied areas, worked out by the testbench; an unoccupied area is
// ignored; area_loaded makes the coordinator wait for that area again;
// halted when every tn is infinite. Also checks the cycle time from the last
// ack to the step pulse: N_AREAS + 3 clocks (ack, completion check, one
// clock per table entry, decision).
module tb_static_coordinator;
  import prdevs_pkg::*;
  localparam int N = 3;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic       start = 0, run = 1;
  ctrl_up_t   up [N];
  logic [N-1:0] ack;
  ctrl_down_t cd;
  logic [N-1:0] occupied = 3'b111;
  logic [1:0] ncomp;
  logic [N-1:0] loaded = '0;
  logic       halted;
  logic [31:0] cycles;

  always_comb begin
    ncomp = '0;
    for (int i = 0; i < N; i++) ncomp = ncomp + 2'(occupied[i]);
  end

  static_coordinator #(.N_AREAS(N)) dut (
    .clk, .rst_n, .start, .run, .ctrl_up(up), .ack_stepped(ack), .ctrl_down(cd),
    .occupied, .n_components(ncomp), .area_loaded(loaded), .halted, .cycles
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // behavioural components: report (tn, valid) after a random delay, hold until ack
  tn_t  rep_tn [N];
  logic rep_v  [N];
  int   delay  [N];
  logic pending [N];
  int   n_conflict = 0;

  always @(posedge clk) begin
    if ($countones({pending[0] && delay[0] == 0, pending[1] && delay[1] == 0, pending[2] && delay[2] == 0}) > 1)
      n_conflict++;
    for (int i = 0; i < N; i++) begin
      if (ack[i]) begin
        check(up[i].stepped, "ack only to a reporting area");
        pending[i] <= 1'b0;
      end
      if (pending[i] && delay[i] > 0) delay[i] <= delay[i] - 1;
    end
    if (rst_n) check($onehot0(ack), "one ack per clock");
  end
  always_comb
    for (int i = 0; i < N; i++)
      up[i] = '{stepped: pending[i] && delay[i] == 0, tn: rep_tn[i], tn_valid: rep_v[i]};

  task automatic arm(input int i, input tn_t now, input bit inf);
    rep_tn[i]  = now + tn_t'($urandom_range(0, 5));
    rep_v[i]   = !inf;
    delay[i]   = $urandom_range(0, 3);
    pending[i] = 1'b1;
  endtask

  function automatic bit expected(output tn_t m);
    bit f = 0;
    m = '0;
    for (int i = 0; i < N; i++)
      if (occupied[i] && rep_v[i] && (!f || rep_tn[i] < m)) begin m = rep_tn[i]; f = 1; end
    return f;
  endfunction

  tn_t now, exp_tn;
  bit  exp_ok;
  int  gap;
  initial begin
    for (int i = 0; i < N; i++) begin pending[i] = 0; delay[i] = 0; rep_tn[i] = '0; rep_v[i] = 0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    now = 0;
    for (int i = 0; i < N; i++) arm(i, 0, 0);
    repeat (10) @(posedge clk); #1;
    check(!cd.step, "no step before start");
    start = 1;
    for (int c = 0; c < 60; c++) begin
      if (c == 20) begin occupied[2] = 1'b0; pending[2] = 0; end  // area 3 emptied
      exp_ok = expected(exp_tn);
      gap = 0;
      while (!cd.step && gap < 100) begin
        @(posedge clk); #1;
        if (!(pending[0] || pending[1] || pending[2])) gap++;
      end
      check(cd.step, "step issued");
      check(exp_ok && cd.tn_min == exp_tn, $sformatf("tn_min = smallest valid tn (%0d vs %0d)", cd.tn_min, exp_tn));
      if (c > 0) check(gap == N + 3, $sformatf("last ack to step: %0d clocks (cycle %0d)", gap, c));
      now = cd.tn_min;
      @(posedge clk); #1;
      check(!cd.step, "step lasts one clock");
      for (int i = 0; i < N; i++) if (occupied[i]) arm(i, now, ($urandom_range(0, 3) == 0) && i != 0);
      if (c == 40) begin
        // area 3 receives a new component in the middle of the cycle, while
        // area 1 is still busy (as the caller of addComponent would be)
        delay[0] = 20;
        repeat (6) @(posedge clk);
        #1 occupied[2] = 1'b1; loaded[2] = 1'b1;
        @(posedge clk); #1 loaded[2] = 1'b0;
        arm(2, now, 0);
        delay[2] = 4;
      end
    end
    // all passive: halt
    while (!cd.step) begin @(posedge clk); #1; end
    @(posedge clk); #1;
    for (int i = 0; i < N; i++) arm(i, now, 1);
    repeat (30) @(posedge clk); #1;
    check(halted, "halted when no tn is valid");
    check(n_conflict > 0, "simultaneous reports happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
