// tb_reconfigurable_area: one area taken through the configurations a partial
// reconfiguration can give it. Generator1: start-up report tn = 2, emission
// with its full id at time 2, new tn 4. Decouple: every output silent while
// a report is pending, and the report reappears when released. Blank: no
// output at all. Counter (id 2): infinite tn at start-up, a coin from its
// connected generator counted after a step, the message bus never requested.
// Generator2 loaded at time 10: start-up report tn = 13.
module tb_reconfigurable_area;
  import prdevs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  comp_type_t lt = CT_GEN1;
  logic       area_rst = 0, decouple = 0, ack = 0, grant = 0, sc_done = 0;
  comp_id_t   id = 8'd1;
  ctrl_down_t cd = '0;
  ctrl_up_t   up;
  msg_t       bus = '0, req;
  sc_req_t    sc;
  conn_upd_t  cu = '0;
  logic [15:0] count;
  logic       overrun;

  reconfigurable_area dut (
    .clk, .rst_n, .loaded_type(lt), .area_rst, .decouple, .own_comp_id(id),
    .ctrl_down(cd), .ack_stepped(ack), .ctrl_up(up), .bus_msg(bus), .msg_req(req),
    .msg_grant(grant), .sc_req(sc), .sc_done, .sc_return(8'd0), .conn_upd(cu),
    .count, .overrun
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  task automatic tick(input int n = 1);
    repeat (n) @(posedge clk);
    #1;
  endtask
  task automatic do_ack();
    ack = 1; tick(); ack = 0;
  endtask
  task automatic reconfigure(input comp_type_t t, input comp_id_t new_id);
    area_rst = 1; decouple = 1; tick(2);
    lt = t; id = new_id; tick(3);
    area_rst = 0; decouple = 0; tick();
  endtask

  initial begin
    tick(2); rst_n = 1; tick(2);
    check(up.stepped && up.tn_valid && up.tn == 2, "generator1: start-up tn 2");
    do_ack();
    cd = '{step: 1'b1, tn_min: 2}; tick(); cd.step = 0; tick();
    check(req.valid && req.sender == '{comp: 8'd1, port: 4'd1}, "generator1 requests the bus");
    decouple = 1; #1;
    check(req == '0 && up == '0 && sc == '0, "decoupled: outputs silent");
    decouple = 0; grant = 1; tick(); grant = 0; tick();
    check(up.stepped && up.tn == 4, "generator1: tn 4 after emission");
    decouple = 1; #1 check(!up.stepped, "decoupled: report hidden");
    decouple = 0; #1 check(up.stepped, "report back when released");
    do_ack();
    reconfigure(CT_BLANK, 8'd0);
    tick(3);
    check(up == '0 && req == '0 && sc == '0, "blank area silent");
    reconfigure(CT_COUNTER, 8'd2);
    tick();
    check(up.stepped && !up.tn_valid, "counter: start-up tn infinite");
    do_ack();
    cu = '{update_connection: 1'b1, out_id: '{comp: 8'd5, port: 4'd1}, in_id: '{comp: 8'd2, port: 4'd1}};
    tick(); cu = '0;
    bus = '{valid: 1'b1, sender: '{comp: 8'd5, port: 4'd1}, value: 8'd1}; tick(); bus = '0;
    cd = '{step: 1'b1, tn_min: 8}; tick(); cd.step = 0; tick(2);
    check(count == 1 && up.stepped && up.tn_valid && up.tn == 8, "counter counted the coin");
    check(req == '0, "counter never requests the message bus");
    do_ack();
    cd.tn_min = 10;
    reconfigure(CT_GEN2, 8'd3);
    tick();
    check(up.stepped && up.tn == 13 && count == 0, "generator2 created at 10: tn 13");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
