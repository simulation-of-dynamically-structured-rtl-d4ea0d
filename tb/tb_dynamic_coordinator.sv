// tb_dynamic_coordinator: two areas (generator1 id 1, counter id 2 at reset)
// and the partial reconfiguration controller played by the testbench.
// Checks the initial connection broadcast and ready; addComponent with no
// free area returns 0 without reconfiguration; removeComponent(1) requests
// the blank bitstream of area 1 (01), holds the area decoupled and in reset
// until prc_done, then frees it and returns 1; addComponent(generator2)
// requests bitstream 21, returns the new id 3, fills the table and pulses
// area_loaded; add/removeConnection broadcast the connection for one clock
// (removal with out_id 0); removeComponent of an unknown id returns 0;
// n_components follows the table; two simultaneous callers are served one
// after the other.
module tb_dynamic_coordinator;
  import prdevs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  sc_req_t   sc_req [2];
  logic [1:0] sc_done;
  comp_id_t  sc_return;
  conn_upd_t cu;
  logic      prc_trigger, prc_done = 0;
  bs_id_t    bs;
  logic [1:0] decouple, area_rst, occupied, loaded;
  comp_type_t area_type [2];
  comp_id_t  area_id [2];
  logic [1:0] ncomp;
  logic      ready;

  dynamic_coordinator dut (
    .clk, .rst_n, .sc_req, .sc_done, .sc_return, .conn_upd(cu), .prc_trigger,
    .prc_bitstream_id(bs), .prc_done, .decouple, .area_rst, .occupied,
    .area_type, .area_comp_id(area_id), .n_components(ncomp), .area_loaded(loaded), .ready
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  int     n_trig = 0;
  bs_id_t last_bs;
  int     n_conn = 0;
  conn_upd_t last_cu;
  logic [1:0] loaded_seen = '0;
  always @(posedge clk) begin
    if (prc_trigger) begin n_trig++; last_bs = bs; end
    if (cu.update_connection) begin n_conn++; last_cu = cu; end
    loaded_seen |= loaded;
  end

  // PR controller: answers prc_done 10 clocks after a trigger, checking the
  // area stays decoupled and in reset meanwhile
  initial begin
    forever begin
      @(posedge clk);
      if (prc_trigger) begin
        logic [1:0] d;
        #1 d = decouple;
        check($onehot(d) && area_rst == d, "area decoupled and in reset");
        repeat (10) begin
          @(posedge clk); #1;
          check(decouple == d && area_rst == d, "isolation held during reconfiguration");
        end
        prc_done = 1; @(posedge clk); #1 prc_done = 0;
        check(decouple == '0 && area_rst == '0, "area released after prc_done");
      end
    end
  end

  task automatic call(input int who, input sc_type_t ty, input comp_type_t ct,
                      input comp_id_t id1, input comp_id_t id2, output comp_id_t ret);
    int n = 0;
    sc_req[who] = '{sc: 1'b1, sc_type: ty, comp_type: ct, compo_id_1: id1, port_id_1: 4'd1,
                    compo_id_2: id2, port_id_2: 4'd1};
    while (!sc_done[who] && n < 200) begin @(posedge clk); #1; n++; end
    ret = sc_return;
    check(sc_done[who] && $onehot(sc_done), "sc_done to the caller only");
    @(posedge clk); #1;
    sc_req[who] = '0;
    check(sc_done == '0, "sc_done is one clock");
  endtask

  comp_id_t r;
  initial begin
    sc_req[0] = '0; sc_req[1] = '0;
    repeat (2) @(posedge clk); #1 rst_n = 1;
    repeat (4) @(posedge clk); #1;
    check(ready, "ready after initial connections");
    check(n_conn == 1 && last_cu.out_id == '{comp: 8'd1, port: 4'd1} && last_cu.in_id == '{comp: 8'd2, port: 4'd1},
          "initial connection generator1 -> counter broadcast");
    check(occupied == 2'b11 && ncomp == 2 && area_id[0] == 1 && area_id[1] == 2 &&
          area_type[0] == CT_GEN1 && area_type[1] == CT_COUNTER, "initial occupation table");
    call(1, SC_ADD_COMPONENT, CT_GEN2, '0, '0, r);
    check(r == 0 && n_trig == 0, "no free area: returns 0, no reconfiguration");
    call(1, SC_REMOVE_CONNECTION, CT_BLANK, 8'd1, 8'd2, r);
    check(n_conn == 2 && last_cu.out_id == '0 && last_cu.in_id == '{comp: 8'd2, port: 4'd1}, "removeConnection broadcast");
    check(r == 2, "removeConnection returns the input component id");
    call(1, SC_REMOVE_COMPONENT, CT_BLANK, 8'd1, '0, r);
    check(n_trig == 1 && last_bs == 8'd1, "remove: blank bitstream 01 of area 1");
    check(r == 1 && occupied == 2'b10 && ncomp == 1 && area_type[0] == CT_BLANK && area_id[0] == 0, "area 1 freed");
    call(1, SC_REMOVE_COMPONENT, CT_BLANK, 8'd9, '0, r);
    check(r == 0 && n_trig == 1, "unknown id: returns 0, no reconfiguration");
    loaded_seen = '0;
    call(1, SC_ADD_COMPONENT, CT_GEN2, '0, '0, r);
    check(n_trig == 2 && last_bs == 8'd21, "add generator2 in area 1: bitstream 21");
    check(r == 3 && occupied == 2'b11 && area_type[0] == CT_GEN2 && area_id[0] == 3, "new id 3 in table");
    check(loaded_seen == 2'b01, "area_loaded pulsed for area 1");
    call(1, SC_ADD_CONNECTION, CT_BLANK, 8'd3, 8'd2, r);
    check(last_cu.out_id == '{comp: 8'd3, port: 4'd1} && last_cu.in_id == '{comp: 8'd2, port: 4'd1}, "addConnection broadcast");
    // two callers at once: removeComponent(2) from area 1 and addConnection from area 2
    fork
      begin comp_id_t a; call(0, SC_REMOVE_COMPONENT, CT_BLANK, 8'd2, '0, a); check(a == 2, "caller 1 served"); end
      begin comp_id_t b; call(1, SC_ADD_CONNECTION, CT_BLANK, 8'd3, 8'd2, b); check(b == 2, "caller 2 served"); end
    join
    check(n_trig == 3 && last_bs == 8'd2, "remove counter: blank bitstream 02 of area 2");
    call(0, SC_ADD_COMPONENT, CT_COUNTER, '0, '0, r);
    check(n_trig == 4 && last_bs == 8'd31 && r == 4, "counter in area 2: bitstream 31, id 4");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
