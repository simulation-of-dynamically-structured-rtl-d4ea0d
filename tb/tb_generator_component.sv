// tb_generator_component: plays the coordinator and the bus for one
// generator (PERIOD 2) and one generator2 instance (PERIOD 3). Checks the
// start-up report (tn = creation time + period), emission and the new tn when
// imminent, no emission when not, the output held until the bus grant, the
// stepped/ack_stepped handshake and the cycle counts: an imminent step with
// an immediate grant reports stepped 3 clocks after the step pulse, a
// non-imminent one 2 clocks after.
module tb_generator_component;
  import prdevs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctrl_down_t cd = '0;
  logic       ack = 0, ack3 = 0, grant = 0;
  ctrl_up_t   up, up3;
  msg_t       req, req3;
  logic       emitting, emitting3;

  generator_component #(.PERIOD(2)) dut (
    .clk, .rst_n, .own_comp_id(8'd1), .ctrl_down(cd), .ack_stepped(ack),
    .ctrl_up(up), .msg_req(req), .msg_grant(grant), .emitting
  );
  generator_component #(.PERIOD(3)) dut3 (
    .clk, .rst_n, .own_comp_id(8'd3), .ctrl_down(cd), .ack_stepped(ack3),
    .ctrl_up(up3), .msg_req(req3), .msg_grant(1'b0), .emitting(emitting3)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one simulation cycle at time t; grant the bus grant_delay clocks after
  // the request; returns clocks from step pulse to stepped and whether a
  // message was sent
  task automatic cycle(input tn_t t, input int grant_delay, output int lat, output bit sent);
    int n, g;
    sent = 0; g = 0;
    cd.tn_min = t; cd.step = 1;
    @(posedge clk); #1 cd.step = 0;
    n = 1;
    while (!up.stepped && n < 50) begin
      if (req.valid) begin
        check(req.sender == '{comp: 8'd1, port: GEN_EVENT_PORT} && req.value == 8'd1, "message EVENT = true from port 1");
        if (g == grant_delay) begin grant = 1; sent = 1; end
        g++;
      end
      #1;
      @(posedge clk); #1 grant = 0;
      n++;
    end
    lat = n;
    check(!req.valid, "no request after stepped");
    ack = 1; @(posedge clk); #1 ack = 0;
    check(!up.stepped, "stepped dropped after ack");
  endtask

  int  lat;
  bit  sent;
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    @(posedge clk); #1;
    @(posedge clk); #1;
    check(up.stepped && up.tn_valid && up.tn == 2, "start-up report tn = 0 + 2");
    check(up3.stepped && up3.tn == 3, "generator2 start-up report tn = 3");
    ack = 1; ack3 = 1; @(posedge clk); #1 ack = 0; ack3 = 0;
    cycle(2, 0, lat, sent);
    check(sent && lat == 3, $sformatf("imminent: emits, stepped after 3 clocks (got %0d)", lat));
    check(up.tn == 4, "tn = 2 + 2");
    cycle(3, 0, lat, sent);
    check(!sent && lat == 2, $sformatf("not imminent: no emission, stepped after 2 clocks (got %0d)", lat));
    check(up.tn == 4, "tn unchanged");
    cycle(4, 5, lat, sent);
    check(sent && lat == 8, $sformatf("emission waits for the grant (got %0d)", lat));
    check(up.tn == 6, "tn = 4 + 2");
    cycle(6, 0, lat, sent);
    check(sent && up.tn == 8, "periodic emission");
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
