// dynamic_coordinator: structure-change part of the coordinator.
//
// Components call structure-change (SC) functions by holding sc_req (sc = 1,
// sc_type and parameters) until sc_done; a round-robin arbiter picks one
// caller at a time. Four functions exist:
//   addComponent(type)            -> id of the new component, 0 if no area is free
//   removeComponent(compo_id_1)   -> the removed id, 0 if it does not exist
//   addConnection(id1.port1 -> id2.port2)    -> compo_id_2
//   removeConnection(id1.port1 -> id2.port2) -> compo_id_2
// Connection calls are not checked: the parameters are broadcast for one
// clock on the connection-update interface (out_id = 0 for a removal) and
// every input communication block updates itself.
// Component calls use two tables. The bitstream table gives the bitstream
// for a (area, type) pair; the values of areas 1 and 2 are those of the
// platform's example table, further areas use 64 + 4*area + type. The
// occupation table holds, per area, whether it is occupied, the component
// type and the component id. addComponent takes the lowest free area and the
// next unused id; removeComponent looks the id up and loads the area's blank
// bitstream. For either, the area is decoupled and held in reset, the
// bitstream id is sent to the partial reconfiguration controller with a
// one-clock prc_trigger, and on prc_done the area is released, the table
// updated and area_loaded pulsed for that area (added component only).
// sc_done is a one-clock pulse to the caller, with sc_return valid during it.
// After reset the initial connections of the model are broadcast one per
// clock, then ready rises. n_components and occupied feed the static
// coordinator. Tables, the four functions, broadcast of connection changes
// and blank bitstreams follow the platform description; the lowest-free-area
// policy, id allocation, error return 0, the initial-connection broadcast and
// the bitstream numbers beyond two areas are this design's choices.
module dynamic_coordinator
  import prdevs_pkg::*;
#(
  parameter int         N_AREAS                 = 2,
  parameter comp_type_t INIT_TYPE [N_AREAS]     = '{CT_GEN1, CT_COUNTER},
  parameter comp_id_t   INIT_ID   [N_AREAS]     = '{8'd1, 8'd2},
  parameter int         N_INIT_CONN             = 1,
  parameter full_id_t   INIT_CONN_OUT [N_INIT_CONN] = '{'{comp: 8'd1, port: 4'd1}},
  parameter full_id_t   INIT_CONN_IN  [N_INIT_CONN] = '{'{comp: 8'd2, port: 4'd1}},
  parameter comp_id_t   FIRST_FREE_ID           = 8'd3
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  sc_req_t                      sc_req       [N_AREAS],
  output logic [N_AREAS-1:0]           sc_done,
  output comp_id_t                     sc_return,
  output conn_upd_t                    conn_upd,
  output logic                         prc_trigger,
  output bs_id_t                       prc_bitstream_id,
  input  logic                         prc_done,
  output logic [N_AREAS-1:0]           decouple,
  output logic [N_AREAS-1:0]           area_rst,
  output logic [N_AREAS-1:0]           occupied,
  output comp_type_t                   area_type    [N_AREAS],
  output comp_id_t                     area_comp_id [N_AREAS],
  output logic [$clog2(N_AREAS+1)-1:0] n_components,
  output logic [N_AREAS-1:0]           area_loaded,
  output logic                         ready
);
  localparam int IW = $clog2(N_AREAS > 1 ? N_AREAS : 2);
  localparam int CW = $clog2(N_AREAS + 1);
  localparam int KW = $clog2(N_INIT_CONN + 1);

  // Bitstream memory table.
  function automatic bs_id_t bitstream_id(int area, comp_type_t t);
    if (area == 0) begin
      unique case (t)
        CT_GEN1:    return 8'd12;
        CT_GEN2:    return 8'd21;
        CT_COUNTER: return 8'd34;
        default:    return 8'd1;
      endcase
    end else if (area == 1) begin
      unique case (t)
        CT_GEN1:    return 8'd13;
        CT_GEN2:    return 8'd22;
        CT_COUNTER: return 8'd31;
        default:    return 8'd2;
      endcase
    end
    return bs_id_t'(64 + 4 * area + int'(t));
  endfunction

  typedef enum logic [2:0] {INIT_CONN, IDLE, EXEC, WAIT_PRC, RESPOND} st_t;
  st_t st;

  logic [KW-1:0]  k;
  sc_req_t        req_q;
  logic [IW-1:0]  caller;
  logic [IW-1:0]  tgt;
  comp_id_t       ret_q;
  comp_id_t       next_id;

  logic [N_AREAS-1:0] sc_v, grant;
  logic [IW-1:0]      gidx;
  always_comb for (int i = 0; i < N_AREAS; i++) sc_v[i] = sc_req[i].sc;

  rr_arbiter #(.N(N_AREAS)) u_arb (
    .clk, .rst_n, .req(sc_v), .advance(st == IDLE), .grant, .grant_idx(gidx)
  );

  // Lowest free area, and the area holding req_q.compo_id_1.
  logic          free_found, id_found;
  logic [IW-1:0] free_idx, id_idx;
  always_comb begin
    free_found = 1'b0; free_idx = '0;
    id_found   = 1'b0; id_idx   = '0;
    for (int i = N_AREAS - 1; i >= 0; i--) begin
      if (!occupied[i]) begin free_found = 1'b1; free_idx = IW'(i); end
      if (occupied[i] && area_comp_id[i] == req_q.compo_id_1 && req_q.compo_id_1 != '0) begin
        id_found = 1'b1; id_idx = IW'(i);
      end
    end
  end

  // sc_done is high in the RESPOND cycle only, so the caller has dropped its
  // request by the time the arbiter looks again.
  always_comb begin
    sc_done = '0;
    if (st == RESPOND) sc_done[caller] = 1'b1;
  end
  assign sc_return = ret_q;

  always_comb begin
    n_components = '0;
    for (int i = 0; i < N_AREAS; i++) n_components = n_components + CW'(occupied[i]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st               <= INIT_CONN;
      k                <= '0;
      req_q            <= '0;
      caller           <= '0;
      tgt              <= '0;
      ret_q            <= '0;
      next_id          <= FIRST_FREE_ID;
      conn_upd         <= '0;
      prc_trigger      <= 1'b0;
      prc_bitstream_id <= '0;
      decouple         <= '0;
      area_rst         <= '0;
      area_loaded      <= '0;
      ready            <= 1'b0;
      for (int i = 0; i < N_AREAS; i++) begin
        occupied[i]     <= (INIT_TYPE[i] != CT_BLANK);
        area_type[i]    <= INIT_TYPE[i];
        area_comp_id[i] <= (INIT_TYPE[i] != CT_BLANK) ? INIT_ID[i] : '0;
      end
    end else begin
      conn_upd    <= '0;
      prc_trigger <= 1'b0;
      area_loaded <= '0;
      unique case (st)
        INIT_CONN: begin
          if (int'(k) < N_INIT_CONN) begin
            conn_upd <= '{update_connection: 1'b1, out_id: INIT_CONN_OUT[k], in_id: INIT_CONN_IN[k]};
            k        <= k + 1'b1;
          end else begin
            ready <= 1'b1;
            st    <= IDLE;
          end
        end
        IDLE: if (grant != '0) begin
          req_q  <= sc_req[gidx];
          caller <= gidx;
          st     <= EXEC;
        end
        EXEC: begin
          st <= RESPOND;
          unique case (req_q.sc_type)
            SC_ADD_COMPONENT: begin
              ret_q <= '0;
              if (free_found) begin
                tgt              <= free_idx;
                prc_bitstream_id <= bitstream_id(int'(free_idx), req_q.comp_type);
                prc_trigger      <= 1'b1;
                decouple[free_idx] <= 1'b1;
                area_rst[free_idx] <= 1'b1;
                st               <= WAIT_PRC;
              end
            end
            SC_REMOVE_COMPONENT: begin
              ret_q <= '0;
              if (id_found) begin
                tgt              <= id_idx;
                prc_bitstream_id <= bitstream_id(int'(id_idx), CT_BLANK);
                prc_trigger      <= 1'b1;
                decouple[id_idx] <= 1'b1;
                area_rst[id_idx] <= 1'b1;
                st               <= WAIT_PRC;
              end
            end
            SC_ADD_CONNECTION: begin
              conn_upd <= '{update_connection: 1'b1,
                            out_id: '{comp: req_q.compo_id_1, port: req_q.port_id_1},
                            in_id:  '{comp: req_q.compo_id_2, port: req_q.port_id_2}};
              ret_q    <= req_q.compo_id_2;
            end
            default: begin  // SC_REMOVE_CONNECTION
              conn_upd <= '{update_connection: 1'b1, out_id: '0,
                            in_id:  '{comp: req_q.compo_id_2, port: req_q.port_id_2}};
              ret_q    <= req_q.compo_id_2;
            end
          endcase
        end
        WAIT_PRC: if (prc_done) begin
          decouple[tgt] <= 1'b0;
          area_rst[tgt] <= 1'b0;
          if (req_q.sc_type == SC_ADD_COMPONENT) begin
            occupied[tgt]     <= 1'b1;
            area_type[tgt]    <= req_q.comp_type;
            area_comp_id[tgt] <= next_id;
            area_loaded[tgt]  <= 1'b1;
            ret_q             <= next_id;
            next_id           <= next_id + 1'b1;
          end else begin
            occupied[tgt]     <= 1'b0;
            area_type[tgt]    <= CT_BLANK;
            area_comp_id[tgt] <= '0;
            ret_q             <= req_q.compo_id_1;
          end
          st <= RESPOND;
        end
        RESPOND: st <= IDLE;
        default: st <= IDLE;
      endcase
    end
  end
endmodule
