// tb_sellink: self-checking testbench of sellink.
// For random probability rows it computes the expected choice from the
// selection rule (smallest cumulative sum above the PRN the unit reports,
// falling back to the last non-zero entry) and checks the index, the
// translated address, the `none` flag, the 2*NBR+2 cycle latency, and that
// the PRN sequence follows the x^8+x^6+x^5+x^4+1 LFSR.
module tb_sellink;
  localparam int NBR = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [8*NBR-1:0] row;
  logic [NBR-1:0][31:0] nbr_addr;
  logic done, none;
  logic [1:0] sel_idx;
  logic [31:0] sel_addr;
  logic [7:0] prn_used;
  int checks = 0, failures = 0;

  sellink #(.NBR(NBR)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] p [NBR];
    logic [7:0] exp_prn, prev_prn;
    int cyc, acc, exp_i, last_nz, best;
    bit any, found;
    start = 0; row = '0;
    for (int k = 0; k < NBR; k++) nbr_addr[k] = 32'h0A00_0000 + 32'(k) * 16 + 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    exp_prn = 8'hA5;
    for (int t = 0; t < 300; t++) begin
      // mostly rows summing to 255, some sparse or all-zero rows
      if (t % 50 == 7) for (int k = 0; k < NBR; k++) p[k] = 0;
      else if (t % 5 == 1) begin
        for (int k = 0; k < NBR; k++) p[k] = ($urandom % 3 == 0) ? 8'($urandom % 128) : 8'd0;
      end else begin
        int rem = 255;
        for (int k = 0; k < NBR - 1; k++) begin p[k] = 8'($urandom % (rem + 1)); rem -= p[k]; end
        p[NBR-1] = 8'(rem);
      end
      for (int k = 0; k < NBR; k++) row[8*k +: 8] = p[k];
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == 2 * NBR + 2, $sformatf("latency %0d", cyc));
      check(prn_used == exp_prn, $sformatf("prn %h exp %h", prn_used, exp_prn));
      acc = 0; found = 0; best = 0; last_nz = 0; any = 0; exp_i = 0;
      for (int k = 0; k < NBR; k++) begin
        acc += p[k];
        if (p[k] != 0) begin last_nz = k; any = 1; end
        if (!found && acc > int'(exp_prn)) begin found = 1; best = k; end
      end
      exp_i = found ? best : last_nz;
      check(none == !any, "none flag");
      if (any) begin
        check(sel_idx == 2'(exp_i), $sformatf("row %h prn %h sel %0d exp %0d", row, exp_prn, sel_idx, exp_i));
        check(sel_addr == nbr_addr[exp_i], "address translation");
      end
      prev_prn = exp_prn;
      exp_prn = {prev_prn[6:0], prev_prn[7] ^ prev_prn[5] ^ prev_prn[4] ^ prev_prn[3]};
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
