// topctrl: the top controller of the engine. An FSM that parses one ant
// packet per command and sequences the next-node selection (sellink), the
// reinforcement calculation (setrfm) and the routing-table update
// (uptrtable), with all memory traffic through the AHB master.
//
// Memory layout seen through mem_*: the 40-word ant packet at cfg.ant_addr;
// the routing table at cfg.rt_base, one word per destination k holding the
// NBR byte probabilities P_0..P_3 (bits [8i+7:8i]); the local traffic model
// at cfg.tm_base, one 32-bit bCost word per destination. With NBR = 4 this is
// the m*n + 4*n bytes of external memory of the design.
//
// Command CMD_PROCESS reads the packet and:
//  forward ant   - removes it (RES_CIRCLE) if this node is already among its
//                  visited nodes (a circle); otherwise appends this node and
//                  the current time, and either turns it into a backward ant
//                  (this node is dNode, or tNodeNum reached cfg.max_nodes, in
//                  which case this node becomes the destination) and sends it
//                  to the previous node, or selects the next node with sellink.
//  backward ant  - this node is intNode[pNodeOdr-1]; f is intNode[pNodeOdr];
//                  curCost is the trip time from here to the destination,
//                  visTime[tNodeNum-1] - visTime[pNodeOdr-1]. setrfm gives r
//                  (and a new bCost, written back), uptrtable updates the row
//                  of dNode, and the ant moves one node back; at index 0 it has
//                  reached its source and is consumed (RES_ARRIVED).
// Command CMD_CREATE builds a new forward ant at cfg.ant_addr whose dNode is
// cfg.dest_manual (manual mode) or a random entry of the destination table
// (random mode), and routes it from this node.
// The packet is written back unless the ant is removed or consumed; `fin`
// pulses with `result` and `next_hop` (the address to send the ant to).
//
// The circle check, the maximum tNodeNum rule, the parsing and the unit
// sequencing follow the design; the meaning of pNodeOdr on the way back,
// rewriting dNode when the maximum is reached, the result codes, the
// rejection of malformed ants (RES_BAD) and the state sequence are this
// design's choices. Trip times are 64-bit differences saturated to 32 bits.
module topctrl
  import ant_pkg::*;
#(
  parameter int unsigned NBR   = 4,
  parameter int unsigned NDEST = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  cmd_e                     cmd,
  input  se_cfg_t                  cfg,
  input  logic [NBR-1:0][31:0]     nbr_addr,
  input  logic [NDEST-1:0][31:0]   dest_addr,
  input  logic [63:0]              now,
  output logic                     busy,
  output logic                     fin,
  output result_e                  result,
  output logic [31:0]              next_hop,
  // memory port (ahb_master user side)
  output logic                     mem_req,
  output logic                     mem_we,
  output logic [31:0]              mem_addr,
  output logic [31:0]              mem_wdata,
  input  logic                     mem_done,
  input  logic                     mem_err,
  input  logic [31:0]              mem_rdata,
  // sellink
  output logic                     sl_start,
  output logic [8*NBR-1:0]         sl_row,
  input  logic                     sl_done,
  input  logic                     sl_none,
  input  logic [31:0]              sl_addr,
  // setrfm
  output logic                     sr_start,
  output logic [$clog2(NDEST)-1:0] sr_dest,
  output logic [31:0]              sr_cur_cost,
  output logic [31:0]              sr_bcost,
  input  logic                     sr_done,
  input  logic [7:0]               sr_r,
  input  logic [31:0]              sr_bcost_new,
  input  logic                     sr_bcost_wr,
  // uptrtable
  output logic                     ut_start,
  output logic [8*NBR-1:0]         ut_row,
  output logic [$clog2(NBR)-1:0]   ut_f,
  output logic [7:0]               ut_r,
  input  logic                     ut_done,
  input  logic [8*NBR-1:0]         ut_row_out
);
  localparam int unsigned NW = $clog2(NBR);
  localparam int unsigned DW = $clog2(NDEST);

  typedef enum logic [4:0] {
    T_IDLE, T_RD_PKT, T_PICK, T_PARSE, T_RD_ROW, T_SEL, T_SEL_WAIT,
    T_RD_BCOST, T_RFM, T_RFM_WAIT, T_WR_BCOST, T_UPT, T_UPT_WAIT, T_WR_ROW,
    T_WR_PKT, T_FIN
  } tstate_e;
  tstate_e state;

  logic [PKT_WORDS-1:0][31:0] pkt;
  logic [5:0]    widx;         // packet word counter
  logic          is_bwd;       // current ant is handled as backward
  logic          creating;     // current command is CMD_CREATE
  logic [DW-1:0] d_idx;        // routing-table row of dNode
  logic [NW-1:0] f_idx;        // neighbour the ant had used
  logic [3:0]    back_i;       // index of this node in a backward ant
  logic [31:0]   cur_cost;
  logic [31:0]   bcost_q;
  logic [31:0]   row_q;
  logic [DW:0]   tries;
  logic [DW-1:0] pick;
  logic [7:0]    rnd;

  lfsr8 #(.SEED(8'h5C)) u_rnd (.clk, .rst_n, .step(1'b1), .value(rnd));

  // ---- packet fields -------------------------------------------------------
  logic [7:0]  f_type, f_order, f_tnum;
  logic [31:0] f_dnode;
  always_comb begin
    f_type  = pkt[W_TYPE][31:24];
    f_dnode = pkt[W_DNODE];
    f_order = pkt[W_ORDER][31:24];
    f_tnum  = pkt[W_ORDER][23:16];
  end

  // Circle: this node already among the visited ones.
  logic circle;
  always_comb begin
    circle = 1'b0;
    for (int k = 0; k < MAX_VISIT; k++)
      if (k < int'(f_tnum) && pkt[W_INTNODE + k] == cfg.own_addr) circle = 1'b1;
  end

  // Destination table lookup of dNode.
  logic          d_hit;
  logic [DW-1:0] d_lookup;
  always_comb begin
    d_hit    = 1'b0;
    d_lookup = '0;
    for (int k = NDEST - 1; k >= 0; k--)
      if (f_dnode != 32'd0 && dest_addr[k] == f_dnode) begin
        d_hit    = 1'b1;
        d_lookup = DW'(k);
      end
  end

  // Neighbour table lookup of intNode[pNodeOdr] (the hop a backward ant took
  // from this node on its way out).
  logic          n_hit;
  logic [NW-1:0] n_lookup;
  logic [31:0]   f_node;
  always_comb begin
    f_node   = pkt[W_INTNODE + int'(f_order[3:0])];
    n_hit    = 1'b0;
    n_lookup = '0;
    for (int k = NBR - 1; k >= 0; k--)
      if (f_node != 32'd0 && nbr_addr[k] == f_node) begin
        n_hit    = 1'b1;
        n_lookup = NW'(k);
      end
  end

  // Trip time from visited node i to the last visited node, saturated.
  function automatic logic [31:0] trip_time(input logic [PKT_WORDS-1:0][31:0] p,
                                            input logic [3:0] i, input logic [3:0] last);
    logic [63:0] t_i, t_l, d;
    t_i = {p[W_VISTIME + 2*int'(i)], p[W_VISTIME + 2*int'(i) + 1]};
    t_l = {p[W_VISTIME + 2*int'(last)], p[W_VISTIME + 2*int'(last) + 1]};
    d   = t_l - t_i;
    return (d[63:32] != 32'd0) ? 32'hFFFF_FFFF : d[31:0];
  endfunction

  // ---- memory port -----------------------------------------------------------
  always_comb begin
    mem_req   = 1'b0;
    mem_we    = 1'b0;
    mem_addr  = '0;
    mem_wdata = '0;
    unique case (state)
      T_RD_PKT:   begin mem_req = 1'b1; mem_addr = cfg.ant_addr + {24'd0, widx, 2'b00}; end
      T_WR_PKT:   begin mem_req = 1'b1; mem_we = 1'b1;
                        mem_addr = cfg.ant_addr + {24'd0, widx, 2'b00};
                        mem_wdata = pkt[widx]; end
      T_RD_ROW:   begin mem_req = 1'b1; mem_addr = cfg.rt_base + 32'(d_idx) * 4; end
      T_WR_ROW:   begin mem_req = 1'b1; mem_we = 1'b1;
                        mem_addr = cfg.rt_base + 32'(d_idx) * 4; mem_wdata = row_q; end
      T_RD_BCOST: begin mem_req = 1'b1; mem_addr = cfg.tm_base + 32'(d_idx) * 4; end
      T_WR_BCOST: begin mem_req = 1'b1; mem_we = 1'b1;
                        mem_addr = cfg.tm_base + 32'(d_idx) * 4; mem_wdata = bcost_q; end
      default: ;
    endcase
  end

  assign sl_row      = row_q[8*NBR-1:0];
  assign sr_dest     = d_idx;
  assign sr_cur_cost = cur_cost;
  assign sr_bcost    = bcost_q;
  assign ut_row      = row_q[8*NBR-1:0];
  assign ut_f        = f_idx;
  assign busy        = (state != T_IDLE);

  // ---- FSM -------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= T_IDLE;
      pkt      <= '0;
      widx     <= '0;
      is_bwd   <= 1'b0;
      creating <= 1'b0;
      d_idx    <= '0;
      f_idx    <= '0;
      back_i   <= '0;
      cur_cost <= '0;
      bcost_q  <= '0;
      row_q    <= '0;
      tries    <= '0;
      pick     <= '0;
      fin      <= 1'b0;
      result   <= RES_NONE;
      next_hop <= '0;
      sl_start <= 1'b0;
      sr_start <= 1'b0;
      ut_start <= 1'b0;
      ut_r     <= '0;
    end else begin
      fin      <= 1'b0;
      sl_start <= 1'b0;
      sr_start <= 1'b0;
      ut_start <= 1'b0;
      if (mem_done && mem_err) begin
        // a bus error aborts the command and removes the ant
        result <= RES_BAD;
        state  <= T_FIN;
      end else begin
        unique case (state)
          T_IDLE: begin
            widx     <= '0;
            next_hop <= '0;
            if (cmd == CMD_PROCESS) begin
              creating <= 1'b0;
              state    <= T_RD_PKT;
            end else if (cmd == CMD_CREATE) begin
              pkt <= '0;
              pkt[W_TYPE]        <= {ANT_FORWARD, 24'd0};
              pkt[W_SNODE]       <= cfg.own_addr;
              pkt[W_DNODE]       <= cfg.dest_manual;
              pkt[W_ORDER]       <= {8'd0, 8'd1, 16'd0};
              pkt[W_INTNODE]     <= cfg.own_addr;
              pkt[W_VISTIME]     <= now[63:32];
              pkt[W_VISTIME + 1] <= now[31:0];
              creating <= 1'b1;
              pick  <= DW'(rnd);
              tries <= '0;
              state <= cfg.random_mode ? T_PICK : T_PARSE;
            end
          end
          T_RD_PKT: if (mem_done) begin
            pkt[widx] <= mem_rdata;
            if (widx == 6'(PKT_WORDS - 1)) state <= T_PARSE;
            else                            widx <= widx + 1'b1;
          end
          T_PICK: begin
            // random mode: first usable destination from a random start
            if (tries == (DW+1)'(NDEST)) begin
              result <= RES_BAD;
              state  <= T_FIN;
            end else if (dest_addr[pick] != 32'd0 && dest_addr[pick] != cfg.own_addr) begin
              pkt[W_DNODE] <= dest_addr[pick];
              state        <= T_PARSE;
            end else begin
              pick  <= pick + 1'b1;
              tries <= tries + 1'b1;
            end
          end
          T_PARSE: begin
            widx <= '0;
            if (creating) begin
              // an ant just created here: only the next node is needed
              is_bwd <= 1'b0;
              d_idx  <= d_lookup;
              if (d_hit && f_dnode != cfg.own_addr) state <= T_RD_ROW;
              else begin result <= RES_BAD; state <= T_FIN; end
            end else if (f_type == ANT_FORWARD) begin
              is_bwd <= 1'b0;
              if (f_tnum == 8'd0 || f_tnum >= 8'(MAX_VISIT)) begin
                result <= RES_BAD;
                state  <= T_FIN;
              end else if (circle) begin
                result <= RES_CIRCLE;
                state  <= T_FIN;
              end else begin
                // record this node
                pkt[W_INTNODE + int'(f_tnum[3:0])]            <= cfg.own_addr;
                pkt[W_VISTIME + 2*int'(f_tnum[3:0])]          <= now[63:32];
                pkt[W_VISTIME + 2*int'(f_tnum[3:0]) + 1]      <= now[31:0];
                pkt[W_ORDER][31:24] <= f_tnum;
                pkt[W_ORDER][23:16] <= f_tnum + 8'd1;
                if (f_dnode == cfg.own_addr || (f_tnum + 8'd1) >= {4'd0, cfg.max_nodes}) begin
                  pkt[W_TYPE][31:24] <= ANT_BACKWARD;
                  pkt[W_DNODE]       <= cfg.own_addr;
                  next_hop <= pkt[W_INTNODE + int'(f_tnum[3:0]) - 1];
                  result   <= RES_TURNED;
                  state    <= T_WR_PKT;
                end else begin
                  d_idx <= d_lookup;
                  if (d_hit) state <= T_RD_ROW;
                  else begin result <= RES_BAD; state <= T_FIN; end
                end
              end
            end else if (f_type == ANT_BACKWARD) begin
              is_bwd   <= 1'b1;
              back_i   <= f_order[3:0] - 4'd1;
              d_idx    <= d_lookup;
              f_idx    <= n_lookup;
              cur_cost <= trip_time(pkt, f_order[3:0] - 4'd1, f_tnum[3:0] - 4'd1);
              if (f_order == 8'd0 || f_order >= f_tnum || f_tnum > 8'(MAX_VISIT) ||
                  pkt[W_INTNODE + int'(f_order[3:0]) - 1] != cfg.own_addr ||
                  !d_hit || !n_hit) begin
                result <= RES_BAD;
                state  <= T_FIN;
              end else begin
                state <= T_RD_BCOST;
              end
            end else begin
              result <= RES_BAD;
              state  <= T_FIN;
            end
          end
          T_RD_ROW: if (mem_done) begin
            row_q <= mem_rdata;
            state <= is_bwd ? T_UPT : T_SEL;
          end
          T_SEL: begin
            sl_start <= 1'b1;
            state    <= T_SEL_WAIT;
          end
          T_SEL_WAIT: if (sl_done) begin
            if (sl_none) begin
              result <= RES_BAD;
              state  <= T_FIN;
            end else begin
              next_hop <= sl_addr;
              result   <= RES_FORWARD;
              state    <= T_WR_PKT;
            end
          end
          T_RD_BCOST: if (mem_done) begin
            bcost_q <= mem_rdata;
            state   <= T_RFM;
          end
          T_RFM: begin
            sr_start <= 1'b1;
            state    <= T_RFM_WAIT;
          end
          T_RFM_WAIT: if (sr_done) begin
            ut_r    <= sr_r;
            bcost_q <= sr_bcost_new;
            state   <= sr_bcost_wr ? T_WR_BCOST : T_RD_ROW;
          end
          T_WR_BCOST: if (mem_done) state <= T_RD_ROW;
          T_UPT: begin
            ut_start <= 1'b1;
            state    <= T_UPT_WAIT;
          end
          T_UPT_WAIT: if (ut_done) begin
            row_q[8*NBR-1:0] <= ut_row_out;
            state            <= T_WR_ROW;
          end
          T_WR_ROW: if (mem_done) begin
            pkt[W_ORDER][31:24] <= {4'd0, back_i};
            if (back_i == 4'd0) begin
              result <= RES_ARRIVED;
              state  <= T_FIN;
            end else begin
              next_hop <= pkt[W_INTNODE + int'(back_i) - 1];
              result   <= RES_BACKWARD;
              state    <= T_WR_PKT;
            end
          end
          T_WR_PKT: if (mem_done) begin
            if (widx == 6'(PKT_WORDS - 1)) state <= T_FIN;
            else                            widx <= widx + 1'b1;
          end
          T_FIN: begin
            fin   <= 1'b1;
            state <= T_IDLE;
          end
          default: state <= T_IDLE;
        endcase
      end
    end
  end
endmodule
