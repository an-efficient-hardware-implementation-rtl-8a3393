// apb_if: AMBA 2.0 APB slave port of the engine, through which the host
// CPU programs and reads the register set.
//
// A write takes effect in the enable (second) cycle of the APB transfer:
// reg_wr pulses with reg_addr and reg_wdata. For a read, the register
// selected by the setup-cycle address is sampled at the end of the setup
// cycle into PRDATA, which therefore holds steady through the enable cycle
// (reg_rd marks that sample, for registers with read side effects). APB of
// AMBA 2.0 has no wait states and no error response, so neither exists here.
// Only the bus type is specified for the design; this timing is the usual
// APB one. ADDR_W low bits of PADDR select the register.
module apb_if #(
  parameter int unsigned ADDR_W = 8
) (
  input  logic              pclk,
  input  logic              presetn,
  input  logic              psel,
  input  logic              penable,
  input  logic              pwrite,
  input  logic [31:0]       paddr,
  input  logic [31:0]       pwdata,
  output logic [31:0]       prdata,
  // register-set side
  output logic              reg_wr,
  output logic              reg_rd,
  output logic [ADDR_W-1:0] reg_addr,
  output logic [31:0]       reg_wdata,
  input  logic [31:0]       reg_rdata
);
  assign reg_addr  = paddr[ADDR_W-1:0];
  assign reg_wdata = pwdata;
  assign reg_wr    = psel && penable && pwrite;
  assign reg_rd    = psel && !penable && !pwrite;

  always_ff @(posedge pclk or negedge presetn) begin
    if (!presetn)    prdata <= '0;
    else if (reg_rd) prdata <= reg_rdata;
  end
endmodule
