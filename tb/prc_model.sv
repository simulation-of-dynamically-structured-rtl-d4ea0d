// prc_model: behavioural stand-in for the partial reconfiguration controller
// of the FPGA vendor, for simulation only.
//
// On prc_trigger it decodes the bitstream id with its own copy of the
// bitstream table (areas 1 and 2 of the example table, 64 + 4*area + type
// beyond), waits DELAY clocks (the time to load a partial bitstream), writes
// the new configuration into area_config and pulses prc_done for one clock.
// area_config starts as the initial model: generator1, counter, then blank.
// n_loads counts the reconfigurations done and last_bs keeps the last id.
module prc_model
  import prdevs_pkg::*;
#(
  parameter int N_AREAS = 2,
  parameter int DELAY   = 20
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       prc_trigger,
  input  bs_id_t     prc_bitstream_id,
  output logic       prc_done,
  output comp_type_t area_config [N_AREAS],
  output int         n_loads,
  output bs_id_t     last_bs
);
  int         wait_cnt;
  int         tgt_area;
  comp_type_t tgt_type;
  logic       busy;

  task automatic decode(input bs_id_t id, output int area, output comp_type_t t);
    case (id)
      8'd12: begin area = 0; t = CT_GEN1;    end
      8'd13: begin area = 1; t = CT_GEN1;    end
      8'd21: begin area = 0; t = CT_GEN2;    end
      8'd22: begin area = 1; t = CT_GEN2;    end
      8'd34: begin area = 0; t = CT_COUNTER; end
      8'd31: begin area = 1; t = CT_COUNTER; end
      8'd1:  begin area = 0; t = CT_BLANK;   end
      8'd2:  begin area = 1; t = CT_BLANK;   end
      default: begin area = (int'(id) - 64) / 4; t = comp_type_t'((int'(id) - 64) % 4); end
    endcase
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_AREAS; i++)
        area_config[i] <= (i == 0) ? CT_GEN1 : (i == 1) ? CT_COUNTER : CT_BLANK;
      prc_done <= 1'b0;
      busy     <= 1'b0;
      wait_cnt <= 0;
      n_loads  <= 0;
      last_bs  <= '0;
      tgt_area <= 0;
      tgt_type <= CT_BLANK;
    end else begin
      prc_done <= 1'b0;
      if (prc_trigger && !busy) begin
        int         a;
        comp_type_t t;
        decode(prc_bitstream_id, a, t);
        tgt_area <= a;
        tgt_type <= t;
        last_bs  <= prc_bitstream_id;
        busy     <= 1'b1;
        wait_cnt <= DELAY;
      end else if (busy) begin
        if (wait_cnt == 0) begin
          area_config[tgt_area] <= tgt_type;
          prc_done <= 1'b1;
          busy     <= 1'b0;
          n_loads  <= n_loads + 1;
        end else begin
          wait_cnt <= wait_cnt - 1;
        end
      end
    end
  end
endmodule
