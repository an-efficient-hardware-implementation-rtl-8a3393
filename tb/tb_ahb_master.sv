// tb_ahb_master: self-checking testbench of ahb_master against the AHB
// memory model (random grant delay and wait states).
// Random writes and reads are compared with a shadow copy of the memory;
// an access beyond the memory must report `err`. Wait states, and the
// minimum transfer time of request, address and data phase, are checked.
module tb_ahb_master;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req, we, done, err;
  logic [31:0] addr, wdata, rdata;
  logic hbusreq, hlock, hgrant, hwrite, hready;
  logic [31:0] haddr, hwdata, hrdata;
  logic [1:0] htrans, hresp;
  logic [2:0] hsize, hburst;
  logic [3:0] hprot;
  int waits, errors;
  int checks = 0, failures = 0;
  logic [31:0] shadow [256];

  ahb_master dut (.hclk(clk), .hresetn(rst_n), .*);
  ahb_mem_model #(.WORDS(256), .MAX_WAIT(3)) u_mem (
    .hclk(clk), .hresetn(rst_n), .hbusreq, .hgrant, .haddr, .htrans, .hwrite, .hwdata,
    .hrdata, .hready, .hresp, .waits, .errors,
    .bd_we(1'b0), .bd_addr(0), .bd_wdata(32'd0), .bd_rdata());

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic xfer(input bit w, input logic [31:0] a, input logic [31:0] d, output logic [31:0] q,
                      output bit e, output int cyc);
    @(negedge clk); req = 1; we = w; addr = a; wdata = d;
    cyc = 0;
    do begin @(negedge clk); cyc++; end while (!done);
    q = rdata; e = err;
    req = 0;
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] q, a, d;
    bit e;
    int cyc;
    req = 0; we = 0; addr = 0; wdata = 0;
    for (int i = 0; i < 256; i++) shadow[i] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      a = 32'($urandom % 256) << 2;
      if ($urandom % 2) begin
        d = $urandom;
        xfer(1, a, d, q, e, cyc);
        shadow[a[9:2]] = d;
        check(!e, "write error");
      end else begin
        xfer(0, a, 0, q, e, cyc);
        check(!e && q == shadow[a[9:2]], $sformatf("read %h got %h exp %h", a, q, shadow[a[9:2]]));
      end
      check(cyc >= 3, $sformatf("transfer too short: %0d", cyc));
    end
    xfer(0, 32'h0000_1000, 0, q, e, cyc);
    check(e, "error response reported");
    xfer(0, 32'h0000_0010, 0, q, e, cyc);
    check(!e && q == shadow[4], "transfer after error");
    check(waits > 0 && errors == 1, "wait states and one error seen");
    $display("waits %0d errors %0d", waits, errors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
