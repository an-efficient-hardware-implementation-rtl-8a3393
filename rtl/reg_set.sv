// reg_set: configuration and status registers of the engine, written and
// read by the host through the APB port.
//
// The design has the user control all units by register configuration;
// the map below is this design's own (byte offsets, see ant_pkg):
//   0x00 CTRL    W: bit0=1 start processing the ant at ANT, bit1=1 create a
//                new ant at ANT (both self-clearing); R/W: bit2 random dNode
//                mode, bit3 interrupt enable
//   0x04 STATUS  R: bit0 busy, bit1 done (write 1 to clear), [7:4] result,
//                [9:8] index of the selected neighbour
//   0x08 OWN, 0x0C ANT, 0x10 RT, 0x14 TM, 0x18 DMAN (manual dNode)
//   0x1C NEXTHOP R: address the ant must be sent to
//   0x20 BTTH bCost time threshold, 0x24 CSTH curCost size threshold
//   0x28 RFM     [4:0] norm shift, [10:8] C_res max, [20:16] C_res scale
//   0x2C MAXN    [3:0] maximum tNodeNum (reset 12)
//   0x40 + 4i    neighbour address table, i < NBR
//   0x80 + 4k    destination address table, k < NDEST (address 0 = unused)
// A start is ignored while the controller is busy. The interrupt is the
// done flag gated by the enable. Registers without reset values named here
// reset to 0; BTTH, CSTH and RFM reset to usable values (see below).
module reg_set
  import ant_pkg::*;
#(
  parameter int unsigned NBR   = 4,
  parameter int unsigned NDEST = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // from apb_if
  input  logic                   reg_wr,
  input  logic [7:0]             reg_addr,
  input  logic [31:0]            reg_wdata,
  output logic [31:0]            reg_rdata,
  // to / from the top controller
  output cmd_e                   cmd,
  output se_cfg_t                cfg,
  output logic [NBR-1:0][31:0]   nbr_addr,
  output logic [NDEST-1:0][31:0] dest_addr,
  input  logic                   busy,
  input  logic                   fin,
  input  result_e                result,
  input  logic [31:0]            next_hop,
  input  logic [$clog2(NBR)-1:0] sel_idx,
  output logic                   irq
);
  logic                   irq_en, done_flag;
  result_e                res_q;
  logic [31:0]            hop_q;
  logic [$clog2(NBR)-1:0] idx_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cmd       <= CMD_NONE;
      cfg       <= '0;
      cfg.max_nodes  <= 4'd12;
      cfg.bcost_tth  <= 32'h0100_0000;
      cfg.cost_sth   <= 32'h0010_0000;
      cfg.norm_shift <= 5'd8;
      cfg.cres_max   <= 3'd2;
      cfg.cres_scale <= 5'd16;
      nbr_addr  <= '0;
      dest_addr <= '0;
      irq_en    <= 1'b0;
      done_flag <= 1'b0;
      res_q     <= RES_NONE;
      hop_q     <= '0;
      idx_q     <= '0;
    end else begin
      cmd <= CMD_NONE;
      if (fin) begin
        done_flag <= 1'b1;
        res_q     <= result;
        hop_q     <= next_hop;
        idx_q     <= sel_idx;
      end
      if (reg_wr) begin
        if (reg_addr >= REG_NBR0 && reg_addr < REG_NBR0 + 8'(4 * NBR))
          nbr_addr[reg_addr[$clog2(NBR)+1:2]] <= reg_wdata;
        else if (reg_addr >= REG_DEST0 && reg_addr < REG_DEST0 + 8'(4 * NDEST))
          dest_addr[reg_addr[$clog2(NDEST)+1:2]] <= reg_wdata;
        else begin
          unique case (reg_addr)
            REG_CTRL: begin
              cfg.random_mode <= reg_wdata[2];
              irq_en          <= reg_wdata[3];
              if (!busy && !fin) begin
                if (reg_wdata[0])      cmd <= CMD_PROCESS;
                else if (reg_wdata[1]) cmd <= CMD_CREATE;
              end
            end
            REG_STATUS: if (reg_wdata[1]) done_flag <= 1'b0;
            REG_OWN:  cfg.own_addr    <= reg_wdata;
            REG_ANT:  cfg.ant_addr    <= reg_wdata;
            REG_RT:   cfg.rt_base     <= reg_wdata;
            REG_TM:   cfg.tm_base     <= reg_wdata;
            REG_DMAN: cfg.dest_manual <= reg_wdata;
            REG_BTTH: cfg.bcost_tth   <= reg_wdata;
            REG_CSTH: cfg.cost_sth    <= reg_wdata;
            REG_RFM: begin
              cfg.norm_shift <= reg_wdata[4:0];
              cfg.cres_max   <= reg_wdata[10:8];
              cfg.cres_scale <= reg_wdata[20:16];
            end
            REG_MAXN: cfg.max_nodes <= reg_wdata[3:0];
            default: ;
          endcase
        end
      end
    end
  end

  always_comb begin
    reg_rdata = '0;
    if (reg_addr >= REG_NBR0 && reg_addr < REG_NBR0 + 8'(4 * NBR))
      reg_rdata = nbr_addr[reg_addr[$clog2(NBR)+1:2]];
    else if (reg_addr >= REG_DEST0 && reg_addr < REG_DEST0 + 8'(4 * NDEST))
      reg_rdata = dest_addr[reg_addr[$clog2(NDEST)+1:2]];
    else begin
      unique case (reg_addr)
        REG_CTRL:    reg_rdata = {28'd0, irq_en, cfg.random_mode, 2'b00};
        REG_STATUS:  reg_rdata = {22'd0, 2'(idx_q), res_q, 2'b00, done_flag, busy};
        REG_OWN:     reg_rdata = cfg.own_addr;
        REG_ANT:     reg_rdata = cfg.ant_addr;
        REG_RT:      reg_rdata = cfg.rt_base;
        REG_TM:      reg_rdata = cfg.tm_base;
        REG_DMAN:    reg_rdata = cfg.dest_manual;
        REG_NEXTHOP: reg_rdata = hop_q;
        REG_BTTH:    reg_rdata = cfg.bcost_tth;
        REG_CSTH:    reg_rdata = cfg.cost_sth;
        REG_RFM:     reg_rdata = {11'd0, cfg.cres_scale, 5'd0, cfg.cres_max, 3'd0, cfg.norm_shift};
        REG_MAXN:    reg_rdata = {28'd0, cfg.max_nodes};
        default:     reg_rdata = '0;
      endcase
    end
  end

  assign irq = done_flag && irq_en;
endmodule
