// tb_counter_component: plays the coordinator, the bus and the SC bus for the
// counter (own id 2). Coins are put on the bus from the connected generator,
// then simulation cycles are run. Checks: start-up report with infinite tn,
// counting with the sender filtered by the input block, tn = current time in
// s1 (time advance 0) and infinite again in s0, and the exact structure-change
// calls at 10 and 20 coins with their parameters, including the id returned
// by addComponent being used by the following addConnection.
module tb_counter_component;
  import prdevs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctrl_down_t cd = '0;
  logic       ack = 0;
  ctrl_up_t   up;
  msg_t       bus = '0;
  conn_upd_t  cu = '0;
  sc_req_t    sc;
  logic       sc_done = 0;
  comp_id_t   sc_ret = '0;
  logic [15:0] count;
  logic [3:0]  phase;
  logic        overrun;
  full_id_t    remote;

  counter_component dut (
    .clk, .rst_n, .own_comp_id(8'd2), .ctrl_down(cd), .ack_stepped(ack), .ctrl_up(up),
    .bus_msg(bus), .conn_upd(cu), .sc_req(sc), .sc_done, .sc_return(sc_ret),
    .count, .phase, .overrun, .remote_id(remote)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s (count %0d)", what, count); end
  endtask

  task automatic connect(input comp_id_t c);
    cu = '{update_connection: 1'b1, out_id: '{comp: c, port: 4'd1}, in_id: '{comp: 8'd2, port: 4'd1}};
    if (c == 0) cu.out_id = '0;
    @(posedge clk); #1 cu = '0;
  endtask
  task automatic coin(input comp_id_t c);
    bus = '{valid: 1'b1, sender: '{comp: c, port: 4'd1}, value: 8'd1};
    @(posedge clk); #1 bus = '0;
  endtask

  comp_id_t next_id = 8'd7;
  sc_req_t  seen;
  bit       had_sc;
  // one simulation cycle at time t, serving at most one SC call
  task automatic cycle(input tn_t t);
    int n;
    had_sc = 0;
    cd.tn_min = t; cd.step = 1;
    @(posedge clk); #1 cd.step = 0;
    n = 0;
    while (!up.stepped && n < 100) begin
      if (sc.sc && !had_sc) begin
        seen = sc; had_sc = 1;
        repeat (3) @(posedge clk);
        #1;
        check(sc.sc && sc == seen, "SC call held until done");
        sc_ret = (sc.sc_type == SC_ADD_COMPONENT) ? next_id : sc.compo_id_2;
        if (sc.sc_type == SC_ADD_COMPONENT) next_id++;
        if (sc.sc_type == SC_ADD_CONNECTION) begin
          cu = '{update_connection: 1'b1, out_id: '{comp: sc.compo_id_1, port: sc.port_id_1},
                 in_id: '{comp: sc.compo_id_2, port: sc.port_id_2}};
        end
        if (sc.sc_type == SC_REMOVE_CONNECTION)
          cu = '{update_connection: 1'b1, out_id: '0, in_id: '{comp: sc.compo_id_2, port: sc.port_id_2}};
        sc_done = 1;
        @(posedge clk); #1 sc_done = 0; cu = '0;
      end else begin
        @(posedge clk); #1;
      end
      n++;
    end
    check(up.stepped, "stepped reported");
    ack = 1; @(posedge clk); #1 ack = 0;
  endtask

  task automatic expect_call(input sc_type_t ty, input comp_id_t id1, input comp_type_t ct, input string what);
    check(had_sc && seen.sc_type == ty, {what, ": call type"});
    if (ty == SC_ADD_COMPONENT) check(seen.comp_type == ct, {what, ": component type"});
    else if (ty == SC_REMOVE_COMPONENT) check(seen.compo_id_1 == id1, {what, ": target id"});
    else check(seen.compo_id_1 == id1 && seen.port_id_1 == 4'd1 && seen.compo_id_2 == 8'd2 &&
               seen.port_id_2 == 4'd1, {what, ": connection ids"});
  endtask

  comp_id_t gen;
  tn_t      t;
  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (2) @(posedge clk); #1;
    check(up.stepped && !up.tn_valid, "start-up report: tn infinite");
    ack = 1; @(posedge clk); #1 ack = 0;
    gen = 8'd1;
    connect(gen);
    t = 2;
    cycle(t);
    check(!had_sc && count == 0 && !up.tn_valid, "no coin: nothing happens");
    coin(8'd5);
    cycle(t);
    check(count == 0, "coin from an unconnected generator ignored");
    for (int k = 1; k <= 25; k++) begin
      t = t + 2;
      coin(gen);
      cycle(t);
      check(count == 16'(k) && up.tn_valid && up.tn == t && phase == 4'd1, "coin counted, s1 with tn = now");
      cycle(t);
      if (k == 10 || k == 20) begin
        check(!had_sc && phase == (k == 10 ? 4'd2 : 4'd6) && up.tn_valid && up.tn == t, "enters swap phase");
        cycle(t); expect_call(SC_REMOVE_CONNECTION, gen, CT_BLANK, "removeConnection");
        check(remote == '0, "input disconnected");
        cycle(t); expect_call(SC_REMOVE_COMPONENT, gen, CT_BLANK, "removeComponent");
        cycle(t); expect_call(SC_ADD_COMPONENT, '0, (k == 10) ? CT_GEN2 : CT_GEN1, "addComponent");
        gen = next_id - 1'b1;
        cycle(t); expect_call(SC_ADD_CONNECTION, gen, CT_BLANK, "addConnection with the returned id");
        check(remote == '{comp: gen, port: 4'd1}, "input connected to the new generator");
      end else begin
        check(!had_sc, "no SC call outside the swaps");
      end
      check(phase == 4'd0 && !up.tn_valid, "back to s0, tn infinite");
    end
    check(count == 25, "25 coins");
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
