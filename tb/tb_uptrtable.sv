// tb_uptrtable: self-checking testbench of uptrtable.
// Random rows, reinforcement values and chosen neighbours are applied; the
// result is compared with the update rule evaluated in the testbench:
// P_f += r*(255-P_f)>>8, P_n -= r*P_n>>8. The latency (NBR+1 cycles from
// the start pulse to done) is checked too.
module tb_uptrtable;
  localparam int NBR = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start;
  logic [8*NBR-1:0] row_in, row_out;
  logic [1:0] f_idx;
  logic [7:0] r;
  logic done;
  int checks = 0, failures = 0;

  uptrtable #(.NBR(NBR)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [8*NBR-1:0] exp_row;
    int cyc, p, d;
    start = 0; row_in = '0; f_idx = 0; r = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      row_in = {$urandom, $urandom};
      f_idx  = 2'($urandom);
      r      = (t < 4) ? ((t[0]) ? 8'd255 : 8'd0) : 8'($urandom);
      for (int k = 0; k < NBR; k++) begin
        p = row_in[8*k +: 8];
        if (k == int'(f_idx)) d = p + ((int'(r) * (255 - p)) >> 8);
        else                  d = p - ((int'(r) * p) >> 8);
        exp_row[8*k +: 8] = 8'(d);
      end
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      checks++;
      if (cyc != NBR + 1) begin failures++; $display("FAIL latency %0d", cyc); end
      checks++;
      if (row_out !== exp_row) begin
        failures++;
        $display("FAIL row %h f %0d r %0d -> %h exp %h", row_in, f_idx, r, row_out, exp_row);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
