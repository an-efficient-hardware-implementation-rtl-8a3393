// tb_stigmergy_engine: end-to-end test of the engine at its default
// parameters, in a four-node network shaped like a diamond: source node 0,
// destination node 3, two routes 0-1-3 and 0-2-3.
//
// Each node has its own engine, its own AHB memory (random grant delay and
// wait states) and its select on a shared APB bus. The testbench plays the
// host CPUs and the links: it creates ants at node 0, carries each packet to
// the node the engine names in NEXTHOP after a link delay, starts the engine
// there and waits for its interrupt, until the ant is consumed or removed.
// The node time counts in 200 ps units, 50 per 10 ns clock.
//
// Phase A makes the route through node 1 fast: node 0's probability of
// neighbour 1 for destination 3 must rise clearly above its start value.
// Phase B makes the route through node 2 fast: that probability must then
// overtake. Phase C lowers node 1's maximum tNodeNum so ants turn there, and
// phase D creates ants with random destinations, and phase E lowers the
// size threshold below the trip times. Every mechanism (forward,
// turn at destination, turn at the maximum, backward update, arrival,
// circle removal, bCost expiry, size-threshold saturation, random dNode,
// AHB wait states) is counted and must occur.
module tb_stigmergy_engine;
  import ant_pkg::*;
  localparam int N = 4;
  localparam logic [31:0] NET = 32'h0A00_0000;
  localparam int RTW = 128, TMW = 192;   // word index of routing table and traffic model

  logic clk = 1'b0, rst_n = 1'b0;
  logic [63:0] ntp_time;
  logic [N-1:0] irq, psel;
  logic penable, pwrite;
  logic [31:0] paddr, pwdata;
  logic [31:0] prdata [N];
  logic        hbusreq [N], hlock [N], hgrant [N], hwrite [N], hready [N];
  logic [31:0] haddr [N], hwdata [N], hrdata [N];
  logic [1:0]  htrans [N], hresp [N];
  logic [2:0]  hsize [N], hburst [N];
  logic [3:0]  hprot [N];
  int          waits [N], errors [N];
  logic        bd_we [N];
  int          bd_addr [N];
  logic [31:0] bd_wdata [N], bd_rdata [N];
  int checks = 0, failures = 0;

  for (genvar k = 0; k < N; k++) begin : g_node
    stigmergy_engine u_se (
      .hclk(clk), .hresetn(rst_n), .ntp_time, .irq(irq[k]),
      .psel(psel[k]), .penable, .pwrite, .paddr, .pwdata, .prdata(prdata[k]),
      .hbusreq(hbusreq[k]), .hlock(hlock[k]), .hgrant(hgrant[k]), .haddr(haddr[k]),
      .htrans(htrans[k]), .hwrite(hwrite[k]), .hsize(hsize[k]), .hburst(hburst[k]),
      .hprot(hprot[k]), .hwdata(hwdata[k]), .hrdata(hrdata[k]), .hready(hready[k]),
      .hresp(hresp[k]));
    ahb_mem_model #(.WORDS(256), .MAX_WAIT(2)) u_mem (
      .hclk(clk), .hresetn(rst_n), .hbusreq(hbusreq[k]), .hgrant(hgrant[k]),
      .haddr(haddr[k]), .htrans(htrans[k]), .hwrite(hwrite[k]), .hwdata(hwdata[k]),
      .hrdata(hrdata[k]), .hready(hready[k]), .hresp(hresp[k]), .waits(waits[k]),
      .errors(errors[k]), .bd_we(bd_we[k]), .bd_addr(bd_addr[k]), .bd_wdata(bd_wdata[k]),
      .bd_rdata(bd_rdata[k]));
  end

  // mechanism counters
  int n_fwd, n_turn_dest, n_turn_max, n_bwd, n_arrived, n_circle, n_bad, n_random;
  int n_expired = 0, n_saturated = 0;
  always @(posedge clk) begin
    if (g_node[0].u_se.u_setrfm.done && g_node[0].u_se.u_setrfm.expired) n_expired++;
    if (g_node[1].u_se.u_setrfm.done && g_node[1].u_se.u_setrfm.expired) n_expired++;
    if (g_node[2].u_se.u_setrfm.done && g_node[2].u_se.u_setrfm.expired) n_expired++;
    if (g_node[0].u_se.u_setrfm.done && g_node[0].u_se.u_setrfm.saturated) n_saturated++;
    if (g_node[1].u_se.u_setrfm.done && g_node[1].u_se.u_setrfm.saturated) n_saturated++;
    if (g_node[2].u_se.u_setrfm.done && g_node[2].u_se.u_setrfm.saturated) n_saturated++;
  end

  always #5 clk = ~clk;
  always @(posedge clk) ntp_time <= ntp_time + 64'd50;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_write(input int k, input logic [7:0] a, input logic [31:0] d);
    @(negedge clk); psel = '0; psel[k] = 1; penable = 0; pwrite = 1; paddr = {24'd0, a}; pwdata = d;
    @(negedge clk); penable = 1;
    @(negedge clk); psel = '0; penable = 0;
  endtask

  task automatic apb_read(input int k, input logic [7:0] a, output logic [31:0] d);
    @(negedge clk); psel = '0; psel[k] = 1; penable = 0; pwrite = 0; paddr = {24'd0, a};
    @(negedge clk); penable = 1;
    @(negedge clk); d = prdata[k]; psel = '0; penable = 0;
  endtask

  task automatic bd_write(input int k, input int a, input logic [31:0] d);
    @(negedge clk); bd_we[k] = 1; bd_addr[k] = a; bd_wdata[k] = d;
    @(negedge clk); bd_we[k] = 0;
  endtask

  task automatic bd_read(input int k, input int a, output logic [31:0] d);
    @(negedge clk); bd_addr[k] = a; #1 d = bd_rdata[k];
  endtask

  // Wait for node k's interrupt, then read and clear its status.
  task automatic wait_done(input int k, output result_e res, output logic [31:0] hop);
    logic [31:0] st;
    int guard = 0;
    while (!irq[k] && guard < 20000) begin @(negedge clk); guard++; end
    check(irq[k] == 1'b1, $sformatf("node %0d interrupt", k));
    apb_read(k, REG_STATUS, st);
    res = result_e'(st[7:4]);
    apb_read(k, REG_NEXTHOP, hop);
    apb_write(k, REG_STATUS, 32'h2);
  endtask

  int link_fast, link_slow, via_fast;   // via_fast: node (1 or 2) of the fast route
  function automatic int link_delay(input int a, input int b);
    int mid = (a == 0 || a == 3) ? b : a;
    return (mid == via_fast) ? link_fast : link_slow;
  endfunction

  // One ant from creation at node 0 until it is consumed or removed.
  task automatic run_ant(input bit random_dest);
    result_e res;
    logic [31:0] hop, w;
    int node, nxt, hops;
    apb_write(0, REG_CTRL, random_dest ? 32'hE : 32'hA);
    wait_done(0, res, hop);
    if (random_dest) begin
      bd_read(0, 2, w);
      if (res == RES_FORWARD && w != NET && w >= NET + 1 && w <= NET + 3) n_random++;
    end
    node = 0; hops = 0;
    while ((res == RES_FORWARD || res == RES_TURNED || res == RES_BACKWARD) && hops < 40) begin
      nxt = int'(hop - NET);
      if (nxt < 0 || nxt >= N) begin check(0, $sformatf("next hop %h", hop)); return; end
      for (int i = 0; i < 40; i++) begin
        bd_read(node, i, w);
        bd_write(nxt, i, w);
      end
      repeat (link_delay(node, nxt)) @(negedge clk);
      node = nxt; hops++;
      apb_write(node, REG_CTRL, 32'h9);
      wait_done(node, res, hop);
      unique case (res)
        RES_FORWARD:  n_fwd++;
        RES_TURNED:   begin bd_read(node, 2, w); if (node == 3) n_turn_dest++; else n_turn_max++; end
        RES_BACKWARD: n_bwd++;
        RES_ARRIVED:  n_arrived++;
        RES_CIRCLE:   n_circle++;
        default:      n_bad++;
      endcase
    end
  endtask

  function automatic logic [31:0] row(input int p0, input int p1, input int p2, input int p3);
    return {8'(p3), 8'(p2), 8'(p1), 8'(p0)};
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] w;
    int p_start, p_a, p_b;
    psel = '0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0; ntp_time = 64'h0000_0001_0000_0000;
    for (int k = 0; k < N; k++) begin bd_we[k] = 0; bd_addr[k] = 0; bd_wdata[k] = 0; end
    n_fwd = 0; n_turn_dest = 0; n_turn_max = 0; n_bwd = 0; n_arrived = 0; n_circle = 0;
    n_bad = 0; n_random = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration of every node
    for (int k = 0; k < N; k++) begin
      apb_write(k, REG_OWN, NET + 32'(k));
      apb_write(k, REG_ANT, 32'h000);
      apb_write(k, REG_RT, 32'(RTW * 4));
      apb_write(k, REG_TM, 32'(TMW * 4));
      apb_write(k, REG_DMAN, NET + 3);
      apb_write(k, REG_BTTH, 32'd20_000_000);    // 4 ms
      apb_write(k, REG_CSTH, 32'd400_000);       // 80 us
      apb_write(k, REG_RFM, {11'd0, 5'd17, 5'd0, 3'd3, 3'd0, 5'd8});
      for (int d = 0; d < N; d++) apb_write(k, REG_DEST0 + 8'(4 * d), NET + 32'(d));
      for (int d = 0; d < 16; d++) bd_write(k, TMW + d, 32'hFFFF_FFFF);
    end
    // neighbours and initial probabilities (row of destination d at RTW + d)
    apb_write(0, REG_NBR0, NET + 1); apb_write(0, REG_NBR0 + 4, NET + 2);
    apb_write(1, REG_NBR0, NET + 0); apb_write(1, REG_NBR0 + 4, NET + 3);
    apb_write(2, REG_NBR0, NET + 0); apb_write(2, REG_NBR0 + 4, NET + 3);
    apb_write(3, REG_NBR0, NET + 1); apb_write(3, REG_NBR0 + 4, NET + 2);
    bd_write(0, RTW + 1, row(255, 0, 0, 0)); bd_write(0, RTW + 2, row(0, 255, 0, 0));
    bd_write(0, RTW + 3, row(127, 128, 0, 0));
    bd_write(1, RTW + 3, row(40, 215, 0, 0)); bd_write(2, RTW + 3, row(40, 215, 0, 0));
    apb_read(1, REG_NBR0 + 4, w);
    check(w == NET + 3, "configuration read back");

    bd_read(0, RTW + 3, w); p_start = int'(w[7:0]);
    // phase A: route through node 1 fast
    via_fast = 1; link_fast = 150; link_slow = 900;
    for (int a = 0; a < 50; a++) run_ant(0);
    bd_read(0, RTW + 3, w); p_a = int'(w[7:0]);
    $display("phase A: P(0->1, dest 3) %0d -> %0d", p_start, p_a);
    check(p_a > p_start + 60, "phase A: route via node 1 preferred");
    // phase B: route through node 2 fast
    via_fast = 2;
    for (int a = 0; a < 80; a++) run_ant(0);
    bd_read(0, RTW + 3, w); p_b = int'(w[7:0]);
    $display("phase B: P(0->1, dest 3) %0d, P(0->2, dest 3) %0d", p_b, int'(w[15:8]));
    check(int'(w[15:8]) > p_b, "phase B: route via node 2 preferred");
    // phase C: maximum tNodeNum of 2 at nodes 1 and 2
    apb_write(1, REG_MAXN, 32'd2); apb_write(2, REG_MAXN, 32'd2);
    for (int a = 0; a < 4; a++) run_ant(0);
    apb_write(1, REG_MAXN, 32'd12); apb_write(2, REG_MAXN, 32'd12);
    // phase D: random destinations
    for (int a = 0; a < 6; a++) run_ant(1);
    // phase E: size threshold below the trip times
    for (int k = 0; k < 3; k++) apb_write(k, REG_CSTH, 32'd50_000);
    for (int a = 0; a < 4; a++) run_ant(0);

    $display("forward %0d, turned at destination %0d, turned at maximum %0d, backward %0d",
             n_fwd, n_turn_dest, n_turn_max, n_bwd);
    $display("arrived %0d, circle %0d, rejected %0d, random dNode %0d, bCost expired %0d, saturated %0d",
             n_arrived, n_circle, n_bad, n_random, n_expired, n_saturated);
    $display("AHB wait states %0d %0d %0d %0d", waits[0], waits[1], waits[2], waits[3]);
    check(n_fwd > 0, "forwarding happened");
    check(n_turn_dest > 0, "turn at destination happened");
    check(n_turn_max > 0, "turn at maximum tNodeNum happened");
    check(n_bwd > 0, "backward update happened");
    check(n_arrived > 0, "arrival at source happened");
    check(n_circle > 0, "circle removal happened");
    check(n_bad == 0, "no ant rejected");
    check(n_random == 6, "random dNode happened");
    check(n_expired > 0, "bCost expiry happened");
    check(n_saturated > 0, "size-threshold saturation happened");
    check(waits[0] > 0 && waits[3] > 0, "AHB wait states happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
