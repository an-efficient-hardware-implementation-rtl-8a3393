// tb_setrfm: self-checking testbench of setrfm.
// A reference model in the testbench keeps its own bCost and bCost time per
// destination and evaluates the reinforcement flow (expiry, better trip,
// size-threshold saturation, normalised difference, inverter and C_res
// shift). Directed cases exercise every branch; random ones follow. The
// one-cycle latency is checked on each update.
module tb_setrfm;
  localparam int ND = 16;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [3:0]  dest;
  logic [31:0] cur_cost, bcost, now, bcost_tth, cost_sth;
  logic [4:0]  norm_shift, cres_scale;
  logic [2:0]  cres_max;
  logic done, bcost_wr, expired, saturated;
  logic [7:0]  r, r_prime;
  logic [31:0] bcost_new;
  int checks = 0, failures = 0;
  int n_exp = 0, n_better = 0, n_sat = 0, n_norm = 0;

  setrfm #(.NDEST(ND)) dut (.*);

  always #5 clk = ~clk;

  // reference state
  logic [31:0] m_bcost [ND];
  logic [31:0] m_btime [ND];
  bit          m_valid [ND];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one(input int d, input logic [31:0] cc);
    logic [7:0] e_rp, e_r;
    logic [31:0] e_b, bs, diff;
    int cres;
    bit fresh, init;
    dest = 4'(d); cur_cost = cc; bcost = m_bcost[d];
    fresh = m_valid[d] && ((now - m_btime[d]) < bcost_tth);
    init  = !fresh || (cc <= m_bcost[d]);
    diff  = cc - m_bcost[d];
    if (init) e_rp = 0;
    else if (cc > cost_sth) e_rp = 255;
    else if ((diff >> norm_shift) > 255) e_rp = 255;
    else e_rp = 8'(diff >> norm_shift);
    e_b  = init ? cc : m_bcost[d];
    bs   = e_b >> cres_scale;
    cres = (bs >= 32'(cres_max)) ? 0 : int'(cres_max) - int'(bs);
    e_r  = (8'd255 - e_rp) >> cres;
    if (!fresh) n_exp++;
    else if (init) n_better++;
    else if (cc > cost_sth) n_sat++;
    else n_norm++;
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    check(done == 1'b1, "done one cycle after start");
    check(r_prime == e_rp, $sformatf("r' %0d exp %0d (cc %0d b %0d)", r_prime, e_rp, cc, m_bcost[d]));
    check(r == e_r, $sformatf("r %0d exp %0d", r, e_r));
    check(bcost_wr == init && bcost_new == e_b, "bcost update");
    check(expired == !fresh, "expired flag");
    if (init) begin m_bcost[d] = cc; m_btime[d] = now; m_valid[d] = 1; end
    @(negedge clk);
    check(done == 1'b0, "done is a pulse");
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    start = 0; dest = 0; cur_cost = 0; bcost = 0; now = 32'd1000;
    bcost_tth = 32'd5000; cost_sth = 32'd60000; norm_shift = 5'd4;
    cres_max = 3'd3; cres_scale = 5'd12;
    for (int k = 0; k < ND; k++) begin m_bcost[k] = '1; m_btime[k] = 0; m_valid[k] = 0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    // directed: first use initialises, better trip, normalised, saturated, expiry
    one(3, 32'd2000);          // never set -> initialise, r' = 0
    now += 10; one(3, 32'd2500);  // r' = 500>>4 = 31
    now += 10; one(3, 32'd1800);  // better -> r' = 0, new bCost
    now += 10; one(3, 32'd9000);  // diff large -> saturated by norm
    now += 10; one(3, 32'd70000); // above size threshold -> 255
    now += 6000; one(3, 32'd3000); // expired -> re-initialised
    now += 10; one(5, 32'd40000); // large bCost -> small C_res
    now += 10; one(5, 32'd40100);
    for (int t = 0; t < 1500; t++) begin
      now += $urandom % 300;
      if (t % 300 == 150) begin norm_shift = 5'($urandom % 8); cres_max = 3'($urandom); cres_scale = 5'(8 + $urandom % 8); end
      one($urandom % ND, 32'(1000 + $urandom % 20000));
    end
    check(n_exp > 0 && n_better > 0 && n_sat > 0 && n_norm > 0, "all branches exercised");
    $display("branches: expired %0d better %0d saturated %0d normalised %0d", n_exp, n_better, n_sat, n_norm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
