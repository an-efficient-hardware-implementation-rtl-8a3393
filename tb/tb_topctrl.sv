// tb_topctrl: self-checking testbench of topctrl with the real sellink,
// setrfm and uptrtable and a word memory in the testbench behind the memory
// port (random 1-3 cycle response).
// Directed ants cover every path of the controller: creating an ant
// (manual and random dNode), forwarding an ant, removing an ant that runs
// in a circle, turning an ant at its destination and at the maximum
// tNodeNum, backward updates at an intermediate node and at the source, and
// rejecting an ant with an unknown destination. Packet fields, next hops,
// the bCost word and the routing-table row are compared with values worked
// out here from the update rules.
module tb_topctrl;
  import ant_pkg::*;
  localparam int NBR = 4, ND = 16;
  localparam logic [31:0] ANT = 32'h000, RT = 32'h200, TM = 32'h300;
  localparam logic [31:0] NET = 32'h0A00_0000;

  logic clk = 1'b0, rst_n = 1'b0;
  cmd_e cmd;
  se_cfg_t cfg;
  logic [NBR-1:0][31:0] nbr_addr;
  logic [ND-1:0][31:0] dest_addr;
  logic [63:0] now;
  logic busy, fin;
  result_e result;
  logic [31:0] next_hop;
  logic mem_req, mem_we, mem_done, mem_err;
  logic [31:0] mem_addr, mem_wdata, mem_rdata;
  logic sl_start, sl_done, sl_none;
  logic [8*NBR-1:0] sl_row;
  logic [1:0] sl_idx;
  logic [31:0] sl_addr;
  logic [7:0] sl_prn;
  logic sr_start, sr_done, sr_bcost_wr, sr_exp, sr_sat;
  logic [3:0] sr_dest;
  logic [31:0] sr_cur_cost, sr_bcost, sr_bcost_new;
  logic [7:0] sr_r, sr_rp;
  logic ut_start, ut_done;
  logic [8*NBR-1:0] ut_row, ut_row_out;
  logic [1:0] ut_f;
  logic [7:0] ut_r;
  int checks = 0, failures = 0;
  logic [31:0] mem [1024];
  int pkt_writes;

  topctrl #(.NBR(NBR), .NDEST(ND)) dut (.*);
  sellink #(.NBR(NBR)) u_sl (.clk, .rst_n, .start(sl_start), .row(sl_row), .nbr_addr,
    .done(sl_done), .none(sl_none), .sel_idx(sl_idx), .sel_addr(sl_addr), .prn_used(sl_prn));
  setrfm #(.NDEST(ND)) u_sr (.clk, .rst_n, .start(sr_start), .dest(sr_dest),
    .cur_cost(sr_cur_cost), .bcost(sr_bcost), .now(now[31:0]), .bcost_tth(cfg.bcost_tth),
    .cost_sth(cfg.cost_sth), .norm_shift(cfg.norm_shift), .cres_max(cfg.cres_max),
    .cres_scale(cfg.cres_scale), .done(sr_done), .r(sr_r), .r_prime(sr_rp),
    .bcost_new(sr_bcost_new), .bcost_wr(sr_bcost_wr), .expired(sr_exp), .saturated(sr_sat));
  uptrtable #(.NBR(NBR)) u_ut (.clk, .rst_n, .start(ut_start), .row_in(ut_row), .f_idx(ut_f),
    .r(ut_r), .done(ut_done), .row_out(ut_row_out));

  always #5 clk = ~clk;
  always @(posedge clk) now <= now + 1;

  // memory behind the port
  int lat;
  always @(posedge clk) begin
    mem_done <= 1'b0;
    if (mem_req && !mem_done) begin
      if (lat == 0) begin
        mem_done  <= 1'b1;
        mem_rdata <= mem[mem_addr[11:2]];
        if (mem_we) begin
          mem[mem_addr[11:2]] <= mem_wdata;
          if (mem_addr < ANT + 160) pkt_writes++;
        end
        lat = $urandom % 3;
      end else lat--;
    end
  end
  assign mem_err = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input cmd_e c, output result_e res, output logic [31:0] hop);
    @(negedge clk); cmd = c; @(negedge clk); cmd = CMD_NONE;
    while (!fin) @(negedge clk);
    res = result; hop = next_hop;
    @(negedge clk);
  endtask

  function automatic logic [31:0] upd(input logic [31:0] row, input int f, input int r);
    logic [31:0] o;
    int p;
    for (int k = 0; k < 4; k++) begin
      p = row[8*k +: 8];
      o[8*k +: 8] = (k == f) ? 8'(p + ((r * (255 - p)) >> 8)) : 8'(p - ((r * p) >> 8));
    end
    return o;
  endfunction

  task automatic clear_ant();
    for (int i = 0; i < 40; i++) mem[i] = '0;
  endtask

  task automatic put_ant(input logic [7:0] typ, input int src, input int dst, input int order,
                         input int nodes[], input longint times[]);
    clear_ant();
    mem[0] = {typ, 24'd0};
    mem[1] = NET + 32'(src);
    mem[2] = NET + 32'(dst);
    mem[3] = {8'(order), 8'(nodes.size()), 16'd0};
    foreach (nodes[i]) begin
      mem[4 + i] = NET + 32'(nodes[i]);
      mem[16 + 2*i] = times[i][63:32];
      mem[17 + 2*i] = times[i][31:0];
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    result_e res;
    logic [31:0] hop, row, w3;
    logic [63:0] t0, tv;
    int n_ok;
    cmd = CMD_NONE; now = 64'h0000_0001_0000_0000; pkt_writes = 0; lat = 0;
    for (int i = 0; i < 1024; i++) mem[i] = '0;
    cfg = '0;
    cfg.own_addr = NET + 2; cfg.ant_addr = ANT; cfg.rt_base = RT; cfg.tm_base = TM;
    cfg.dest_manual = NET + 9; cfg.max_nodes = 12; cfg.bcost_tth = 32'd1_000_000;
    cfg.cost_sth = 32'd100_000; cfg.norm_shift = 5'd2; cfg.cres_max = 3'd2; cfg.cres_scale = 5'd16;
    nbr_addr[0] = NET + 1; nbr_addr[1] = NET + 3; nbr_addr[2] = NET + 4; nbr_addr[3] = 0;
    for (int k = 0; k < ND; k++) dest_addr[k] = NET + 32'(k);
    dest_addr[15] = 0;                      // unused entry
    for (int k = 0; k < ND; k++) begin mem[128 + k] = 32'h0055_5555; mem[192 + k] = '1; end
    mem[128 + 9] = 32'h00FF_0000;           // to node 9 only via neighbour 2 (node 4)
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. create, manual dNode
    t0 = now;
    run(CMD_CREATE, res, hop);
    check(res == RES_FORWARD && hop == NET + 4, $sformatf("create: res %0d hop %h", res, hop));
    check(mem[0][31:24] == ANT_FORWARD && mem[1] == NET + 2 && mem[2] == NET + 9, "create: header");
    check(mem[3][31:16] == 16'h0001 && mem[4] == NET + 2, "create: order/tNodeNum/intNode");
    tv = {mem[16], mem[17]};
    check(tv >= t0 && tv <= now, "create: visTime[0]");

    // 2. forward ant from node 1, going to 9
    put_ant(ANT_FORWARD, 1, 9, 0, '{1}, '{64'h1_0000_0010});
    t0 = now;
    run(CMD_PROCESS, res, hop);
    check(res == RES_FORWARD && hop == NET + 4, "forward: next hop");
    check(mem[3][31:16] == 16'h0102 && mem[5] == NET + 2, "forward: appended");
    tv = {mem[18], mem[19]};
    check(tv >= t0 && tv <= now && {mem[16], mem[17]} == 64'h1_0000_0010, "forward: visTime");

    // 3. circle
    put_ant(ANT_FORWARD, 1, 9, 2, '{1, 2, 3}, '{64'd1, 64'd2, 64'd3});
    w3 = mem[3]; pkt_writes = 0;
    run(CMD_PROCESS, res, hop);
    check(res == RES_CIRCLE && pkt_writes == 0 && mem[3] == w3, "circle: removed, not written");

    // 4. destination reached
    put_ant(ANT_FORWARD, 1, 2, 1, '{1, 5}, '{64'd1, 64'd2});
    run(CMD_PROCESS, res, hop);
    check(res == RES_TURNED && hop == NET + 5, "dest: turned, back to node 5");
    check(mem[0][31:24] == ANT_BACKWARD && mem[3][31:16] == 16'h0203 && mem[6] == NET + 2, "dest: packet");

    // 5. maximum tNodeNum reached (max 4)
    cfg.max_nodes = 4;
    put_ant(ANT_FORWARD, 1, 9, 2, '{1, 5, 6}, '{64'd1, 64'd2, 64'd3});
    run(CMD_PROCESS, res, hop);
    check(res == RES_TURNED && hop == NET + 6 && mem[2] == NET + 2 && mem[0][31:24] == ANT_BACKWARD,
          "max nodes: this node becomes the destination");
    cfg.max_nodes = 12;

    // 6. backward ant at an intermediate node: first update initialises bCost
    mem[128 + 9] = 32'h0055_5555;
    put_ant(ANT_BACKWARD, 1, 9, 2, '{1, 2, 4, 9}, '{64'd100, 64'd200, 64'd350, 64'd700});
    row = mem[128 + 9];
    run(CMD_PROCESS, res, hop);
    check(res == RES_BACKWARD && hop == NET + 1 && mem[3][31:24] == 8'd1, "backward: next hop and order");
    check(mem[192 + 9] == 32'd500, $sformatf("backward: bCost %0d", mem[192 + 9]));
    check(mem[128 + 9] == upd(row, 2, 63), $sformatf("backward: row %h exp %h", mem[128 + 9], upd(row, 2, 63)));
    // 6b. slower trip: r' = (900-500)>>2 = 100, r = 155>>2 = 38
    put_ant(ANT_BACKWARD, 1, 9, 2, '{1, 2, 4, 9}, '{64'd100, 64'd200, 64'd350, 64'd1100});
    row = mem[128 + 9];
    run(CMD_PROCESS, res, hop);
    check(res == RES_BACKWARD && mem[192 + 9] == 32'd500, "backward 2: bCost kept");
    check(mem[128 + 9] == upd(row, 2, 38), $sformatf("backward 2: row %h exp %h", mem[128 + 9], upd(row, 2, 38)));

    // 7. backward ant at its source, via neighbour 1 (node 3), better trip
    put_ant(ANT_BACKWARD, 2, 9, 1, '{2, 3, 9}, '{64'd1000, 64'd1100, 64'd1300});
    row = mem[128 + 9]; pkt_writes = 0;
    run(CMD_PROCESS, res, hop);
    check(res == RES_ARRIVED && pkt_writes == 0, "arrived: consumed");
    check(mem[192 + 9] == 32'd300 && mem[128 + 9] == upd(row, 1, 63), "arrived: update via node 3");

    // 8. unknown destination
    put_ant(ANT_FORWARD, 1, 15, 0, '{1}, '{64'd1});
    run(CMD_PROCESS, res, hop);
    check(res == RES_BAD, "unknown destination rejected");

    // 9. random-mode creation
    cfg.random_mode = 1'b1;
    n_ok = 0;
    for (int t = 0; t < 40; t++) begin
      repeat ($urandom % 5) @(negedge clk);
      run(CMD_CREATE, res, hop);
      if (res == RES_FORWARD && mem[2] != NET + 2 && mem[2] != 0 && mem[2] != NET + 15) n_ok++;
    end
    check(n_ok == 40, $sformatf("random mode: %0d of 40 ants valid", n_ok));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
