// lfsr8: 8-bit Fibonacci linear feedback shift register, the pseudo-random
// source of the next-node selection.
//
// Polynomial x^8 + x^6 + x^5 + x^4 + 1 (maximal length, period 255; the
// design only asks for "an 8-bit LFSR", the polynomial and the seed are this
// design's choice). The register shifts left by one each cycle that `step`
// is high; the new bit 0 is the XOR of bits 7, 5, 4 and 3. It never holds 0.
// Reset loads SEED. `value` is the current state, valid every cycle.
module lfsr8 #(
  parameter logic [7:0] SEED = 8'hA5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       step,
  output logic [7:0] value
);
  logic [7:0] state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    state <= (SEED == 8'h00) ? 8'h01 : SEED;
    else if (step) state <= {state[6:0], state[7] ^ state[5] ^ state[4] ^ state[3]};
  end

  assign value = state;
endmodule
