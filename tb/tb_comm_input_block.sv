// tb_comm_input_block: directed test of the input communication block:
// connection updates (own port, other port, removal), sender filtering, the
// one-message buffer with input_read, a message arriving together with
// input_read, and overrun. input_available must rise one clock after the
// message is on the bus.
module tb_comm_input_block;
  import prdevs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  comp_id_t  own = 8'd2;
  msg_t      bus_msg = '0;
  conn_upd_t conn_upd = '0;
  logic      input_read = 0;
  logic      input_available, overrun;
  value_t    input_value;
  full_id_t  input_sender, remote_id;

  comm_input_block #(.PORT(4'd1)) dut (
    .clk, .rst_n, .own_comp_id(own), .bus_msg, .conn_upd, .input_read,
    .input_available, .input_value, .input_sender, .remote_id, .overrun
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic send(input comp_id_t c, input port_id_t p, input value_t v, input logic rd = 0);
    bus_msg = '{valid: 1'b1, sender: '{comp: c, port: p}, value: v};
    input_read = rd;
    @(posedge clk); #1;
    bus_msg = '0; input_read = 0;
  endtask
  task automatic update(input comp_id_t oc, input port_id_t op, input comp_id_t ic, input port_id_t ip);
    conn_upd = '{update_connection: 1'b1, out_id: '{comp: oc, port: op}, in_id: '{comp: ic, port: ip}};
    @(posedge clk); #1;
    conn_upd = '0;
  endtask
  task automatic read();
    input_read = 1; @(posedge clk); #1; input_read = 0;
  endtask

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    send(8'd1, 4'd1, 8'h55);
    check(!input_available, "unconnected port ignores messages");
    update(8'd1, 4'd1, 8'd3, 4'd1);
    check(remote_id == '0, "update for another component ignored");
    update(8'd1, 4'd1, 8'd2, 4'd2);
    check(remote_id == '0, "update for another port ignored");
    update(8'd1, 4'd1, 8'd2, 4'd1);
    check(remote_id == '{comp: 8'd1, port: 4'd1}, "connection stored");
    send(8'd1, 4'd2, 8'h11);
    check(!input_available, "other port of the sender filtered");
    send(8'd5, 4'd1, 8'h12);
    check(!input_available, "other sender filtered");
    bus_msg = '{valid: 1'b1, sender: '{comp: 8'd1, port: 4'd1}, value: 8'hA7};
    #1 check(!input_available, "not yet available in the bus cycle");
    @(posedge clk); #1 bus_msg = '0;
    check(input_available && input_value == 8'hA7, "message captured one clock later");
    check(input_sender == '{comp: 8'd1, port: 4'd1}, "sender captured");
    @(posedge clk); #1;
    check(input_available, "message held until read");
    read();
    check(!input_available, "input_read clears");
    send(8'd1, 4'd1, 8'h01);
    send(8'd1, 4'd1, 8'h02, 1'b1);
    check(input_available && input_value == 8'h02 && !overrun, "message with input_read kept, no overrun");
    send(8'd1, 4'd1, 8'h03);
    check(overrun && input_value == 8'h03, "overrun flagged, newer message kept");
    read();
    update(8'd0, 4'd0, 8'd2, 4'd1);
    check(remote_id == '0, "connection removed");
    send(8'd1, 4'd1, 8'h04);
    check(!input_available, "removed connection filters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
