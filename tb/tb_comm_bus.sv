// tb_comm_bus: three requesters. Random requests: grant is one-hot, goes to
// a requester, and the bus carries exactly the granted request in the same
// cycle. Held requests: all three are served in turn, none waits for more
// than two grants.
module tb_comm_bus;
  import prdevs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  msg_t       req [3];
  logic [2:0] grant;
  msg_t       bus_msg;
  comm_bus #(.N(3)) dut (.clk, .rst_n, .req, .grant, .bus_msg);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int wait_cnt [3];
  initial begin
    for (int i = 0; i < 3; i++) req[i] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < 3; i++) begin
        req[i] = msg_t'($urandom);
        req[i].valid = 1'($urandom);
      end
      #1;
      check($onehot0(grant), "one grant at most");
      check((grant != 0) == (req[0].valid || req[1].valid || req[2].valid), "granted iff requested");
      for (int i = 0; i < 3; i++)
        if (grant[i]) check(req[i].valid && bus_msg == req[i], "bus carries granted message");
      if (grant == 0) check(!bus_msg.valid, "bus idle");
      @(posedge clk); #1;
    end
    // fairness with all three holding their requests
    for (int i = 0; i < 3; i++) begin req[i] = '0; req[i].valid = 1; req[i].sender.comp = comp_id_t'(i + 1); wait_cnt[i] = 0; end
    for (int n = 0; n < 30; n++) begin
      #1;
      for (int i = 0; i < 3; i++) begin
        if (grant[i]) wait_cnt[i] = 0; else wait_cnt[i]++;
        check(wait_cnt[i] <= 2, "round robin: wait at most two grants");
      end
      @(posedge clk); #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
