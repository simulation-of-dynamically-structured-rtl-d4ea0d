// tb_comm_output_block: checks the output communication block with two
// output ports (ids 1 and 2): request and sender id of the pending port,
// lowest port first, output_written only on grant and only to the port sent.
module tb_comm_output_block;
  import prdevs_pkg::*;
  comp_id_t   own = 8'd9;
  logic [1:0] avail = '0;
  value_t     val [2];
  logic       handled = 0;
  logic [1:0] written;
  msg_t       req;

  comm_output_block #(.N_OUT(2), .FIRST_PORT(4'd1)) dut (
    .own_comp_id(own), .output_available(avail), .output_value(val),
    .output_handled(handled), .output_written(written), .bus_req(req)
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    val[0] = 8'h10; val[1] = 8'h20;
    #1 check(!req.valid && written == '0, "idle: no request");
    avail = 2'b10; #1;
    check(req.valid && req.sender == '{comp: 8'd9, port: 4'd2} && req.value == 8'h20, "port 2 requests");
    check(written == '0, "no written without grant");
    handled = 1; #1;
    check(written == 2'b10, "written to port 2 on grant");
    avail = 2'b11; #1;
    check(req.sender.port == 4'd1 && req.value == 8'h10, "port 1 first");
    check(written == 2'b01, "written only to port 1");
    handled = 0; #1;
    check(written == 2'b00, "nothing written without grant");
    for (int i = 0; i < 20; i++) begin
      avail = 2'($urandom); handled = 1'($urandom); val[0] = 8'($urandom); val[1] = 8'($urandom); #1;
      check(req.valid == (avail != 0), "request iff pending");
      if (avail[0]) check(req.value == val[0] && written == {1'b0, handled}, "random: port 1");
      else if (avail[1]) check(req.value == val[1] && written == {handled, 1'b0}, "random: port 2");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
