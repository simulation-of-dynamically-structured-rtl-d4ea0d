// tb_decoupler: random values on the area side; with decouple low they must
// pass unchanged, with decouple high every output must be zero.
module tb_decoupler;
  import prdevs_pkg::*;
  logic     decouple;
  ctrl_up_t rp_up, st_up;
  msg_t     rp_msg, st_msg;
  sc_req_t  rp_sc, st_sc;
  decoupler dut (.decouple, .rp_ctrl_up(rp_up), .rp_msg_req(rp_msg), .rp_sc_req(rp_sc),
                 .st_ctrl_up(st_up), .st_msg_req(st_msg), .st_sc_req(st_sc));
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    for (int i = 0; i < 200; i++) begin
      decouple = 1'($urandom);
      rp_up  = ctrl_up_t'({$urandom, $urandom});
      rp_msg = msg_t'({$urandom});
      rp_sc  = sc_req_t'({$urandom});
      rp_up.stepped = 1'b1; rp_msg.valid = 1'b1; rp_sc.sc = 1'b1;
      #1;
      if (decouple) check(st_up == '0 && st_msg == '0 && st_sc == '0, "isolated");
      else check(st_up == rp_up && st_msg == rp_msg && st_sc == rp_sc, "transparent");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
