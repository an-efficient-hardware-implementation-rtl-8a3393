// ahb_mem_model: behavioural AHB slave memory and arbiter used by the
// testbenches (not part of the design).
//
// WORDS 32-bit words at byte addresses 0 .. 4*WORDS-1; an access beyond
// them gets the two-cycle ERROR response. Each data phase is stretched by
// 0..MAX_WAIT wait states chosen at random, and HGRANT follows HBUSREQ after
// a random 0..3 cycle delay, so the master sees a busy bus. `waits` and
// `errors` count the wait states and error responses given. The backdoor
// port lets a testbench load and inspect words without bus cycles.
module ahb_mem_model #(
  parameter int WORDS    = 4096,
  parameter int MAX_WAIT = 2
) (
  input  logic        hclk,
  input  logic        hresetn,
  input  logic        hbusreq,
  output logic        hgrant,
  input  logic [31:0] haddr,
  input  logic [1:0]  htrans,
  input  logic        hwrite,
  input  logic [31:0] hwdata,
  output logic [31:0] hrdata,
  output logic        hready,
  output logic [1:0]  hresp,
  output int          waits,
  output int          errors,
  // backdoor port for the testbench: word index, combinational read
  input  logic        bd_we,
  input  int          bd_addr,
  input  logic [31:0] bd_wdata,
  output logic [31:0] bd_rdata
);
  logic [31:0] mem [WORDS];
  logic        dphase, dwrite, derr;
  logic [31:0] daddr;
  int          wcnt;
  logic        err2;

  initial for (int i = 0; i < WORDS; i++) mem[i] = '0;

  always_ff @(posedge hclk or negedge hresetn) begin
    if (!hresetn) begin
      hgrant <= 1'b0;
      dphase <= 1'b0;
      dwrite <= 1'b0;
      derr   <= 1'b0;
      daddr  <= '0;
      wcnt   <= 0;
      err2   <= 1'b0;
      waits  <= 0;
      errors <= 0;
    end else begin
      hgrant <= hbusreq && ($urandom % 4 != 0);
      if (bd_we) mem[bd_addr] <= bd_wdata;
      if (dphase && hready) begin
        if (dwrite && !derr) mem[daddr[31:2]] <= hwdata;
        dphase <= 1'b0;
      end
      if (dphase && !hready) begin
        if (derr) err2 <= 1'b1;
        else if (wcnt > 0) begin wcnt <= wcnt - 1; waits <= waits + 1; end
      end
      if (hready && htrans == 2'b10) begin
        dphase <= 1'b1;
        dwrite <= hwrite;
        daddr  <= haddr;
        derr   <= (haddr[31:2] >= 30'(WORDS));
        err2   <= 1'b0;
        wcnt   <= $urandom % (MAX_WAIT + 1);
        if (haddr[31:2] >= 30'(WORDS)) errors <= errors + 1;
      end
    end
  end

  assign bd_rdata = mem[bd_addr];

  always_comb begin
    hready = 1'b1;
    hresp  = 2'b00;
    hrdata = '0;
    if (dphase) begin
      if (derr) begin
        hresp  = 2'b01;
        hready = err2;
      end else begin
        hready = (wcnt == 0);
        if (!dwrite) hrdata = mem[daddr[31:2]];
      end
    end
  end
endmodule
