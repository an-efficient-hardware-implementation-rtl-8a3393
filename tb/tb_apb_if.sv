// tb_apb_if: self-checking testbench of apb_if.
// A small register file in the testbench sits behind the register-bus side.
// APB writes must produce exactly one reg_wr pulse in the enable cycle with
// the right address and data; APB reads must return the register value on
// PRDATA in the enable cycle, stable even if the register changes then.
module tb_apb_if;
  logic clk = 1'b0, rst_n = 1'b0;
  logic psel, penable, pwrite;
  logic [31:0] paddr, pwdata, prdata;
  logic reg_wr, reg_rd;
  logic [7:0] reg_addr;
  logic [31:0] reg_wdata, reg_rdata;
  logic [31:0] regs [64];
  int wr_pulses = 0;
  int checks = 0, failures = 0;

  apb_if #(.ADDR_W(8)) dut (.pclk(clk), .presetn(rst_n), .*);

  always #5 clk = ~clk;
  assign reg_rdata = regs[reg_addr[7:2]];
  always @(posedge clk) if (reg_wr) begin regs[reg_addr[7:2]] <= reg_wdata; wr_pulses++; end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic apb_write(input logic [31:0] a, input logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 1; paddr = a; pwdata = d;
    #1 check(!reg_wr, "no write in setup cycle");
    @(negedge clk); penable = 1; #1;
    check(reg_wr && reg_addr == a[7:0] && reg_wdata == d, "write in enable cycle");
    @(negedge clk); psel = 0; penable = 0;
  endtask

  task automatic apb_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk); psel = 1; penable = 0; pwrite = 0; paddr = a;
    @(negedge clk); penable = 1; #1;
    d = prdata;
    @(negedge clk); psel = 0; penable = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] shadow [64];
    logic [31:0] q;
    int a;
    psel = 0; penable = 0; pwrite = 0; paddr = 0; pwdata = 0;
    for (int i = 0; i < 64; i++) begin regs[i] = 32'(i) * 32'h0101_0101; shadow[i] = regs[i]; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      a = $urandom % 64;
      if ($urandom % 2) begin
        q = $urandom;
        apb_write(32'hFFFF_FF00 | 32'(a * 4), q);
        shadow[a] = q;
      end else begin
        apb_read(32'(a * 4), q);
        check(q == shadow[a], $sformatf("read %0d got %h exp %h", a, q, shadow[a]));
      end
    end
    check(wr_pulses > 0, "writes happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
