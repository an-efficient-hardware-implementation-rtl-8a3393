// sellink: selects the next node for a forward ant from the routing-table
// probabilities of its destination.
//
// The row of NBR byte probabilities P_1..P_n (n = NBR neighbours) arrives as
// one word with `start`. As in the selection flow of the design, the
// probabilities are accumulated one per cycle into registers R_1..R_n
// (R_i = P_1 + ... + P_i). The registers are then compared one per cycle
// with a pseudo-random number PRN from an 8-bit LFSR: of the registers with
// R_i > PRN, the one with the smallest R_i (kept in R_temp) names the next
// node. Neighbour i is finally translated to its address through the address
// table `nbr_addr`.
//
// Own choices: one cycle per register for both passes, so `done` comes
// 2*NBR+2 cycles after `start`; the LFSR steps once per selection; when no
// R_i exceeds PRN (probabilities summing below 255) the last neighbour with a
// non-zero probability is taken; an all-zero row reports `none`.
// Probability P_i is byte i of `row` (bits [8i+7:8i]).
module sellink #(
  parameter int unsigned NBR = 4,
  parameter logic [7:0]  SEED = 8'hA5
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  logic [8*NBR-1:0]      row,
  input  logic [NBR-1:0][31:0]  nbr_addr,
  output logic                  done,      // one-cycle pulse
  output logic                  none,      // with done: no usable neighbour
  output logic [$clog2(NBR)-1:0] sel_idx,
  output logic [31:0]           sel_addr,
  output logic [7:0]            prn_used
);
  localparam int unsigned IW = $clog2(NBR);

  typedef enum logic [1:0] {S_IDLE, S_ACC, S_CMP, S_OUT} state_e;
  state_e state;

  logic [NBR-1:0][9:0]  r;        // accumulated probabilities R_1..R_n
  logic [8*NBR-1:0]     row_q;
  logic [IW:0]          i;
  logic [9:0]           r_temp;
  logic                 found;
  logic [IW-1:0]        best;
  logic [IW-1:0]        last_nz;
  logic                 any_nz;
  logic [7:0]           prn;
  logic                 lfsr_step;

  lfsr8 #(.SEED(SEED)) u_lfsr (.clk, .rst_n, .step(lfsr_step), .value(prn));

  assign lfsr_step = (state == S_OUT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      r        <= '0;
      row_q    <= '0;
      i        <= '0;
      r_temp   <= '1;
      found    <= 1'b0;
      best     <= '0;
      last_nz  <= '0;
      any_nz   <= 1'b0;
      done     <= 1'b0;
      none     <= 1'b0;
      sel_idx  <= '0;
      sel_addr <= '0;
      prn_used <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          row_q   <= row;
          i       <= '0;
          any_nz  <= 1'b0;
          state   <= S_ACC;
        end
        S_ACC: begin
          // R_i = R_{i-1} + P_i
          r[i[IW-1:0]] <= ((i == 0) ? 10'd0 : r[i[IW-1:0]-1'b1])
                          + 10'(row_q[8*i[IW-1:0] +: 8]);
          if (row_q[8*i[IW-1:0] +: 8] != 8'd0) begin
            last_nz <= i[IW-1:0];
            any_nz  <= 1'b1;
          end
          if (i == (IW+1)'(NBR - 1)) begin
            i      <= '0;
            r_temp <= '1;
            found  <= 1'b0;
            state  <= S_CMP;
          end else begin
            i <= i + 1'b1;
          end
        end
        S_CMP: begin
          if (r[i[IW-1:0]] > {2'b00, prn} && r[i[IW-1:0]] < r_temp) begin
            best   <= i[IW-1:0];
            r_temp <= r[i[IW-1:0]];
            found  <= 1'b1;
          end
          if (i == (IW+1)'(NBR - 1)) state <= S_OUT;
          else                   i <= i + 1'b1;
        end
        S_OUT: begin
          done     <= 1'b1;
          none     <= !any_nz;
          sel_idx  <= found ? best : last_nz;
          sel_addr <= nbr_addr[found ? best : last_nz];
          prn_used <= prn;
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
