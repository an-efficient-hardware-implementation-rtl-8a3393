// uptrtable: applies the routing-table update rule to the row of one
// destination d.
//
// For the neighbour f that the ant used and every other neighbour n:
//   P_fd <- P_fd + r * (255 - P_fd) / 256
//   P_nd <- P_nd - r * P_nd / 256
// with r the byte reinforcement value (r/256 in (0,1)). The divisions are
// shifts by 8 bits, truncating. The row holds NBR byte probabilities,
// P_i in bits [8i+7:8i].
// Own choice: one shared 8x8 multiplier handles one entry per cycle, so
// `done` comes NBR+1 cycles after `start`, with `row_out` valid from then
// until the next `start`.
module uptrtable #(
  parameter int unsigned NBR = 4
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   start,
  input  logic [8*NBR-1:0]       row_in,
  input  logic [$clog2(NBR)-1:0] f_idx,
  input  logic [7:0]             r,
  output logic                   done,
  output logic [8*NBR-1:0]       row_out
);
  localparam int unsigned IW = $clog2(NBR);

  logic          busy;
  logic [IW:0]   i;
  logic [7:0]    r_q;
  logic [IW-1:0] f_q;
  logic [7:0]    p, p_new, m_in;
  logic [15:0]   prod;

  always_comb begin
    p     = row_out[8*i[IW-1:0] +: 8];
    m_in  = (i[IW-1:0] == f_q) ? (8'd255 - p) : p;
    prod  = r_q * m_in;
    p_new = (i[IW-1:0] == f_q) ? p + prod[15:8] : p - prod[15:8];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      i       <= '0;
      r_q     <= '0;
      f_q     <= '0;
      done    <= 1'b0;
      row_out <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        busy    <= 1'b1;
        i       <= '0;
        r_q     <= r;
        f_q     <= f_idx;
        row_out <= row_in;
      end else if (busy) begin
        row_out[8*i[IW-1:0] +: 8] <= p_new;
        if (i == (IW+1)'(NBR - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          i <= i + 1'b1;
        end
      end
    end
  end
endmodule
