// tb_prdevs_top: end-to-end test of the platform running the generator/counter
// example with every parameter at its default.
//
// The counter swaps generator1 (period 2) for generator2 (period 3) at 10
// coins and back at 20 coins. The expected trace is worked out by hand from
// the DEVS model and the platform rule that a message is consumed in the
// simulation cycle after the one that sent it:
//   coin k of generator1 (sent at t = 2k) is counted at t = 2k+2, so count 10
//   at t = 22; the swap runs at t = 22, generator2 (id 3) starts with tn = 25;
//   the coin buffered at t = 22 is counted at t = 25 (count 11); generator2's
//   j-th coin is counted at t = 25+3j, so count 20 at t = 52; the swap back
//   runs at t = 52 (generator1 now id 4, tn = 54), count 21 at t = 54 and
//   21+i at t = 54+2i, so count 29 at t = 70.
// Bitstreams requested: 01 (blank area 1), 21 (generator2 in area 1), 01, 12.
// The test also counts the platform mechanisms (simultaneous stepped reports,
// infinite tn, messages held over to the next cycle, decoupling, both kinds
// of reconfiguration and of connection change) and fails if one never occurs.
module tb_prdevs_top;
  import prdevs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic run = 1'b1;
  always #5 clk = ~clk;

  comp_type_t area_config [2];
  logic       prc_trigger, prc_done;
  bs_id_t     prc_bitstream_id;
  ctrl_down_t ctrl_down;
  logic       halted;
  logic [31:0] cycles;
  msg_t       bus_msg;
  conn_upd_t  conn_upd;
  logic [1:0] occupied;
  comp_type_t area_type [2];
  comp_id_t   area_comp_id [2];
  logic [15:0] coin_count;
  logic       overrun;
  int         n_loads;
  bs_id_t     last_bs;

  prdevs_top dut (
    .clk, .rst_n, .run, .area_config, .prc_trigger, .prc_bitstream_id, .prc_done,
    .ctrl_down, .halted, .cycles, .bus_msg, .conn_upd, .occupied, .area_type,
    .area_comp_id, .coin_count, .overrun
  );

  prc_model #(.N_AREAS(2), .DELAY(20)) u_prc (
    .clk, .rst_n, .prc_trigger, .prc_bitstream_id, .prc_done, .area_config, .n_loads, .last_bs
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s (t=%0d count=%0d)", what, ctrl_down.tn_min, coin_count);
    end
  endtask

  // Mechanism counters.
  int n_conflict = 0, n_infinite = 0, n_heldover = 0, n_decouple = 0;
  int n_add = 0, n_remove = 0, n_addconn = 0, n_rmconn = 0, n_msgs = 0;

  // Expected times at which the count reaches each value (0 = not checked).
  function automatic int expected_time(int c);
    if (c >= 1 && c <= 10)  return 2 * c + 2;
    if (c >= 11 && c <= 20) return 25 + 3 * (c - 11);
    if (c >= 21)            return 54 + 2 * (c - 21);
    return 0;
  endfunction

  bs_id_t bs_seen [$];
  logic [15:0] prev_count = '0;

  always @(posedge clk) if (rst_n) begin
    // simultaneous stepped reports: one acknowledged while another waits
    if (dut.ctrl_up[0].stepped && dut.ctrl_up[1].stepped) n_conflict++;
    for (int a = 0; a < 2; a++)
      if (dut.ack_stepped[a] && !dut.ctrl_up[a].tn_valid) n_infinite++;
    if (ctrl_down.step && dut.g_area[1].u_area.u_counter.input_available) n_heldover++;
    if (dut.u_coord.decouple != '0) n_decouple++;
    if (prc_trigger) begin
      bs_seen.push_back(prc_bitstream_id);
      if (prc_bitstream_id == 8'd1 || prc_bitstream_id == 8'd2) n_remove++; else n_add++;
    end
    if (conn_upd.update_connection && ctrl_down.tn_min != 0) begin
      if (conn_upd.out_id == '0) n_rmconn++; else n_addconn++;
    end
    if (bus_msg.valid) begin
      n_msgs++;
      // every message comes from a generator that exists at that moment
      if (bus_msg.sender.comp == 8'd1 || bus_msg.sender.comp == 8'd4)
        check(ctrl_down.tn_min % 2 == 0, "generator1 emits on even times");
      else if (bus_msg.sender.comp == 8'd3)
        check(ctrl_down.tn_min % 3 == 25 % 3 && ctrl_down.tn_min >= 25, "generator2 emits at 25+3j");
      else
        check(1'b0, "message from an unexpected sender");
    end
    if (coin_count != prev_count) begin
      check(coin_count == prev_count + 1, "count increments by one");
      check(int'(ctrl_down.tn_min) == expected_time(int'(coin_count)), $sformatf("time of count %0d", coin_count));
      prev_count <= coin_count;
    end
    check(!overrun, "no message lost in the input buffer");
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (coin_count == 16'd29 || halted);
    run = 1'b0;  // suspend scheduling at the end of the current cycle
    repeat (50) @(posedge clk);
    check(coin_count == 16'd29, "count 29 reached");
    check(ctrl_down.tn_min == 70, "simulation time 70 at count 29");
    check(!halted, "simulation not halted");
    check(bs_seen.size() == 4, "four reconfigurations");
    if (bs_seen.size() == 4) begin
      check(bs_seen[0] == 8'd1,  "first bitstream: blank area 1");
      check(bs_seen[1] == 8'd21, "second bitstream: generator2 in area 1");
      check(bs_seen[2] == 8'd1,  "third bitstream: blank area 1");
      check(bs_seen[3] == 8'd12, "fourth bitstream: generator1 in area 1");
    end
    check(area_comp_id[0] == 8'd4 && area_type[0] == CT_GEN1, "area 1 holds generator1 with id 4");
    check(area_comp_id[1] == 8'd2 && area_type[1] == CT_COUNTER, "area 2 holds the counter, id 2");
    check(occupied == 2'b11, "both areas occupied");
    check(dut.g_area[1].u_area.u_counter.remote_id == '{comp: 8'd4, port: 4'd1}, "counter connected to generator1 id 4");
    $display("mechanisms: conflict=%0d infinite_tn=%0d held_over=%0d decouple=%0d add=%0d remove=%0d addconn=%0d rmconn=%0d msgs=%0d cycles=%0d",
             n_conflict, n_infinite, n_heldover, n_decouple, n_add, n_remove, n_addconn, n_rmconn, n_msgs, cycles);
    check(n_conflict > 0, "stepped conflict happened");
    check(n_infinite > 0, "infinite tn reported");
    check(n_heldover > 0, "message held over to next cycle");
    check(n_decouple > 0, "decoupler used");
    check(n_add == 2 && n_remove == 2, "two adds and two removes");
    check(n_addconn == 2 && n_rmconn == 2, "two addConnection and two removeConnection");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
