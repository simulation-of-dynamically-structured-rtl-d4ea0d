// tb_coordinator: the two coordinator halves together, with two behavioural
// components and the behavioural reconfiguration controller. Area 1 behaves
// like a period-2 generator (reports tn = now + 2 when created and when
// imminent); area 2 is passive (infinite tn) but, in its step at time 6,
// removes component 1 and adds a generator2 in its place. Expected: steps at
// times 2, 4, 6, then the new component (created at 6) is waited for and
// reports 8, giving steps 8, 10, 12; bitstreams 01 then 21; the step count
// matches; during the swap no step is issued.
module tb_coordinator;
  import prdevs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ctrl_down_t cd;
  ctrl_up_t   up [2];
  logic [1:0] ack;
  sc_req_t    sc [2];
  logic [1:0] sc_done;
  comp_id_t   sc_ret;
  conn_upd_t  cu;
  logic [1:0] decouple, area_rst, occupied;
  comp_type_t atype [2];
  comp_id_t   aid [2];
  logic       prc_trigger, prc_done, halted;
  bs_id_t     bs;
  logic [31:0] cycles;
  comp_type_t cfg [2];
  int         n_loads;
  bs_id_t     last_bs;

  coordinator dut (
    .clk, .rst_n, .run(1'b1), .ctrl_down(cd), .ctrl_up(up), .ack_stepped(ack),
    .sc_req(sc), .sc_done, .sc_return(sc_ret), .conn_upd(cu), .decouple, .area_rst,
    .occupied, .area_type(atype), .area_comp_id(aid), .prc_trigger,
    .prc_bitstream_id(bs), .prc_done, .halted, .cycles
  );
  prc_model #(.N_AREAS(2), .DELAY(8)) u_prc (
    .clk, .rst_n, .prc_trigger, .prc_bitstream_id(bs), .prc_done, .area_config(cfg), .n_loads, .last_bs
  );

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // component in area 1: generator-like
  tn_t  a_tn;
  logic a_rep;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n || area_rst[0]) begin
      a_rep <= 1'b0;
      a_tn  <= '0;
    end else begin
      if (a_tn == '0 && !a_rep) begin a_tn <= cd.tn_min + 2; a_rep <= 1'b1; end  // creation report
      if (cd.step) begin
        if (a_tn == cd.tn_min) a_tn <= cd.tn_min + 2;
        a_rep <= 1'b1;
      end
      if (ack[0]) a_rep <= 1'b0;
    end
  end
  assign up[0] = decouple[0] ? '0 : '{stepped: a_rep && !cd.step, tn: a_tn, tn_valid: 1'b1};

  // component in area 2: passive, swaps component 1 at time 6
  logic b_rep = 1'b1;
  bit   swapped = 0;
  assign up[1] = '{stepped: b_rep, tn: '0, tn_valid: 1'b0};
  initial begin
    sc[0] = '0; sc[1] = '0;
    forever begin
      @(posedge clk);
      if (rst_n && ack[1]) b_rep <= 1'b0;
      if (cd.step) begin
        if (cd.tn_min == 6 && !swapped) begin
          swapped = 1;
          #1 sc[1] = '{sc: 1'b1, sc_type: SC_REMOVE_COMPONENT, comp_type: CT_BLANK,
                       compo_id_1: 8'd1, port_id_1: 4'd1, compo_id_2: 8'd2, port_id_2: 4'd1};
          do @(posedge clk); while (!sc_done[1]);
          check(sc_ret == 8'd1, "removeComponent returns 1");
          #1 sc[1] = '{sc: 1'b1, sc_type: SC_ADD_COMPONENT, comp_type: CT_GEN2,
                       compo_id_1: 8'd0, port_id_1: 4'd0, compo_id_2: 8'd0, port_id_2: 4'd0};
          do @(posedge clk); while (!sc_done[1]);
          check(sc_ret == 8'd3, "addComponent returns 3");
          #1 sc[1] = '0;
        end
        b_rep <= 1'b1;
      end
    end
  end

  tn_t times [$];
  always @(posedge clk) if (cd.step) times.push_back(cd.tn_min);
  always @(posedge clk) if (rst_n && cd.step) check(!swapped || !sc[1].sc, "no step during a structure change");

  initial begin
    repeat (2) @(posedge clk); #1 rst_n = 1;
    while (times.size() < 6) @(posedge clk);
    check(times[0] == 2 && times[1] == 4 && times[2] == 6, "steps at 2, 4, 6");
    check(times[3] == 8 && times[4] == 10 && times[5] == 12, "new component waited for: steps at 8, 10, 12");
    check(n_loads == 2 && last_bs == 8'd21, "bitstreams: blank then generator2 in area 1");
    check(cycles == 6, "six cycles counted");
    check(aid[0] == 8'd3 && atype[0] == CT_GEN2, "table: area 1 holds generator2 id 3");
    check(!halted, "not halted");
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
