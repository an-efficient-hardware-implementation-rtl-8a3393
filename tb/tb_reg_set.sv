// tb_reg_set: self-checking testbench of reg_set.
// Checks reset values, write/read-back of every configuration register and
// of the neighbour and destination tables, the self-clearing command pulses
// (one cycle, ignored while busy), capture of result and next hop at `fin`,
// the write-1-to-clear done flag and the interrupt gating.
module tb_reg_set;
  import ant_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic reg_wr;
  logic [7:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  cmd_e cmd;
  se_cfg_t cfg;
  logic [3:0][31:0] nbr_addr;
  logic [15:0][31:0] dest_addr;
  logic busy, fin, irq;
  result_e result;
  logic [31:0] next_hop;
  logic [1:0] sel_idx;
  int checks = 0, failures = 0;

  reg_set #(.NBR(4), .NDEST(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic wr(input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); reg_wr = 1; reg_addr = a; reg_wdata = d;
    @(negedge clk); reg_wr = 0;
  endtask

  task automatic rd(input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); reg_addr = a; #1 d = reg_rdata;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, v;
    int seen;
    reg_wr = 0; reg_addr = 0; reg_wdata = 0; busy = 0; fin = 0; result = RES_NONE;
    next_hop = 0; sel_idx = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    rd(REG_MAXN, q);   check(q == 12 && cfg.max_nodes == 12, "max_nodes resets to 12");
    rd(REG_STATUS, q); check(q == 0, "status after reset");
    // plain registers
    v = $urandom; wr(REG_OWN, v);  rd(REG_OWN, q);  check(q == v && cfg.own_addr == v, "OWN");
    v = $urandom; wr(REG_ANT, v);  rd(REG_ANT, q);  check(q == v && cfg.ant_addr == v, "ANT");
    v = $urandom; wr(REG_RT, v);   rd(REG_RT, q);   check(q == v && cfg.rt_base == v, "RT");
    v = $urandom; wr(REG_TM, v);   rd(REG_TM, q);   check(q == v && cfg.tm_base == v, "TM");
    v = $urandom; wr(REG_DMAN, v); rd(REG_DMAN, q); check(q == v && cfg.dest_manual == v, "DMAN");
    v = $urandom; wr(REG_BTTH, v); rd(REG_BTTH, q); check(q == v && cfg.bcost_tth == v, "BTTH");
    v = $urandom; wr(REG_CSTH, v); rd(REG_CSTH, q); check(q == v && cfg.cost_sth == v, "CSTH");
    wr(REG_RFM, 32'h0015_0607); rd(REG_RFM, q);
    check(q == 32'h0015_0607 && cfg.norm_shift == 7 && cfg.cres_max == 6 && cfg.cres_scale == 21, "RFM");
    wr(REG_MAXN, 32'd5); check(cfg.max_nodes == 5, "MAXN");
    for (int i = 0; i < 4; i++) begin
      v = $urandom; wr(REG_NBR0 + 8'(4 * i), v); rd(REG_NBR0 + 8'(4 * i), q);
      check(q == v && nbr_addr[i] == v, "neighbour table");
    end
    for (int i = 0; i < 16; i++) begin
      v = $urandom; wr(REG_DEST0 + 8'(4 * i), v); rd(REG_DEST0 + 8'(4 * i), q);
      check(q == v && dest_addr[i] == v, "destination table");
    end
    // command pulse
    seen = 0;
    fork
      wr(REG_CTRL, 32'h0000_000D);  // process, random mode, irq enable
      repeat (4) @(posedge clk) if (cmd == CMD_PROCESS) seen++;
    join
    check(seen == 1, "one process pulse");
    check(cfg.random_mode && !irq, "random mode set, no irq yet");
    seen = 0;
    fork
      wr(REG_CTRL, 32'h0000_000A);  // create
      repeat (4) @(posedge clk) if (cmd == CMD_CREATE) seen++;
    join
    check(seen == 1 && !cfg.random_mode, "one create pulse, manual mode");
    busy = 1; seen = 0;
    fork
      wr(REG_CTRL, 32'h0000_0009);
      repeat (4) @(posedge clk) if (cmd != CMD_NONE) seen++;
    join
    check(seen == 0, "start ignored while busy");
    // finish
    @(negedge clk); fin = 1; result = RES_FORWARD; next_hop = 32'hC0A8_0102; sel_idx = 2;
    @(negedge clk); fin = 0; busy = 0;
    rd(REG_STATUS, q);
    check(q[1] && q[7:4] == 4'(RES_FORWARD) && q[9:8] == 2, "status after fin");
    rd(REG_NEXTHOP, q); check(q == 32'hC0A8_0102, "next hop captured");
    check(irq, "irq raised");
    wr(REG_STATUS, 32'h2);
    check(!irq, "irq cleared by W1C");
    rd(REG_STATUS, q); check(!q[1], "done cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
