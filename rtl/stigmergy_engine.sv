// stigmergy_engine: hardware AntNet routing engine ("Stigmergy Engine"), an
// SoC peripheral that processes ant packets so that the time an ant spends
// in a node is short and regular.
//
// Structure (as in the engine's block diagram): an APB slave port and a
// register set through which the host configures the engine and starts
// commands; a top controller that parses ant packets and drives three units
// - sellink (next-node selection), setrfm (reinforcement value) and
// uptrtable (routing-table update); and an AHB master through which the
// controller reads and writes the ant packet, the routing table and the
// local traffic model in system memory. The engine raises `irq` when a
// command has finished (if enabled) and reports in its status and NEXTHOP
// registers what to do with the ant.
//
// Interface: one clock for both buses (hclk = pclk, assumed); active-low
// reset; AMBA 2.0 AHB master and APB slave signals; `ntp_time` is the
// network-synchronised 64-bit node time (an SNTP client outside the engine
// keeps it). NBR = 4 neighbours fills one 32-bit word per routing-table row;
// NDEST destinations. The register map is documented in reg_set.
// sellink's PRN and setrfm's r', expired and saturated outputs are
// observation points for simulation and are not used at this level.
module stigmergy_engine
  import ant_pkg::*;
#(
  parameter int unsigned NBR   = 4,
  parameter int unsigned NDEST = 16
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic [63:0] ntp_time,
  output logic        irq,
  // APB slave
  input  logic        psel,
  input  logic        penable,
  input  logic        pwrite,
  input  logic [31:0] paddr,
  input  logic [31:0] pwdata,
  output logic [31:0] prdata,
  // AHB master
  output logic        hbusreq,
  output logic        hlock,
  input  logic        hgrant,
  output logic [31:0] haddr,
  output logic [1:0]  htrans,
  output logic        hwrite,
  output logic [2:0]  hsize,
  output logic [2:0]  hburst,
  output logic [3:0]  hprot,
  output logic [31:0] hwdata,
  input  logic [31:0] hrdata,
  input  logic        hready,
  input  logic [1:0]  hresp
);
  localparam int unsigned NW = $clog2(NBR);
  localparam int unsigned DW = $clog2(NDEST);

  // register bus
  logic        reg_wr, reg_rd;
  logic [7:0]  reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  // configuration and control
  cmd_e                   cmd;
  se_cfg_t                cfg;
  logic [NBR-1:0][31:0]   nbr_addr;
  logic [NDEST-1:0][31:0] dest_addr;
  logic                   busy, fin;
  result_e                result;
  logic [31:0]            next_hop;
  // memory port
  logic        mem_req, mem_we, mem_done, mem_err;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  // units
  logic                sl_start, sl_done, sl_none;
  logic [8*NBR-1:0]    sl_row;
  logic [NW-1:0]       sl_idx;
  logic [31:0]         sl_addr;
  logic [7:0]          sl_prn;
  logic                sr_start, sr_done, sr_bcost_wr, sr_expired, sr_saturated;
  logic [DW-1:0]       sr_dest;
  logic [31:0]         sr_cur_cost, sr_bcost, sr_bcost_new;
  logic [7:0]          sr_r, sr_r_prime;
  logic                ut_start, ut_done;
  logic [8*NBR-1:0]    ut_row, ut_row_out;
  logic [NW-1:0]       ut_f;
  logic [7:0]          ut_r;

  apb_if #(.ADDR_W(8)) u_apb (
    .pclk(hclk), .presetn(hresetn), .psel, .penable, .pwrite, .paddr, .pwdata, .prdata,
    .reg_wr, .reg_rd, .reg_addr, .reg_wdata, .reg_rdata
  );

  reg_set #(.NBR(NBR), .NDEST(NDEST)) u_regs (
    .clk(hclk), .rst_n(hresetn), .reg_wr, .reg_addr, .reg_wdata, .reg_rdata,
    .cmd, .cfg, .nbr_addr, .dest_addr, .busy, .fin, .result, .next_hop,
    .sel_idx(sl_idx), .irq
  );

  topctrl #(.NBR(NBR), .NDEST(NDEST)) u_ctrl (
    .clk(hclk), .rst_n(hresetn), .cmd, .cfg, .nbr_addr, .dest_addr, .now(ntp_time),
    .busy, .fin, .result, .next_hop,
    .mem_req, .mem_we, .mem_addr, .mem_wdata, .mem_done, .mem_err, .mem_rdata,
    .sl_start, .sl_row, .sl_done, .sl_none, .sl_addr,
    .sr_start, .sr_dest, .sr_cur_cost, .sr_bcost, .sr_done, .sr_r, .sr_bcost_new,
    .sr_bcost_wr,
    .ut_start, .ut_row, .ut_f, .ut_r, .ut_done, .ut_row_out
  );

  sellink #(.NBR(NBR)) u_sellink (
    .clk(hclk), .rst_n(hresetn), .start(sl_start), .row(sl_row), .nbr_addr,
    .done(sl_done), .none(sl_none), .sel_idx(sl_idx), .sel_addr(sl_addr),
    .prn_used(sl_prn)
  );

  setrfm #(.NDEST(NDEST)) u_setrfm (
    .clk(hclk), .rst_n(hresetn), .start(sr_start), .dest(sr_dest),
    .cur_cost(sr_cur_cost), .bcost(sr_bcost), .now(ntp_time[31:0]),
    .bcost_tth(cfg.bcost_tth), .cost_sth(cfg.cost_sth), .norm_shift(cfg.norm_shift),
    .cres_max(cfg.cres_max), .cres_scale(cfg.cres_scale),
    .done(sr_done), .r(sr_r), .r_prime(sr_r_prime), .bcost_new(sr_bcost_new),
    .bcost_wr(sr_bcost_wr), .expired(sr_expired), .saturated(sr_saturated)
  );

  uptrtable #(.NBR(NBR)) u_uptrtable (
    .clk(hclk), .rst_n(hresetn), .start(ut_start), .row_in(ut_row), .f_idx(ut_f),
    .r(ut_r), .done(ut_done), .row_out(ut_row_out)
  );

  ahb_master u_ahb (
    .hclk, .hresetn, .req(mem_req), .we(mem_we), .addr(mem_addr), .wdata(mem_wdata),
    .done(mem_done), .err(mem_err), .rdata(mem_rdata),
    .hbusreq, .hlock, .hgrant, .haddr, .htrans, .hwrite, .hsize, .hburst, .hprot,
    .hwdata, .hrdata, .hready, .hresp
  );
endmodule
