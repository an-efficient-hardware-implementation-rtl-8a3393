// setrfm: computes the reinforcement value r for one backward-ant update and
// maintains the best trip time bCost of the local traffic model.
//
// Following the calculation flow of the design:
//   * if bCost has not been renewed for bcost_tth time units, it is
//     re-initialised and r' = 0;
//   * else if curCost <= bCost, r' = 0 (this trip is the best so far);
//   * else if curCost > cost_sth (the size threshold), r' = 255;
//   * else r' = norm(curCost - bCost).
// Then r = (255 - r') >> C_res, the inverter and shifter of the flow.
// C_res falls as bCost grows: C_res = cres_max - min(cres_max,
// bCost >> cres_scale); both numbers are configuration registers because
// the design leaves the slope to the network.
//
// Own choices: norm() is a right shift by norm_shift saturated at 255;
// when bCost is re-initialised or beaten it takes curCost, and the new
// value is reported on bcost_new with bcost_wr; the time each bCost was set
// is kept here, one 32-bit stamp per destination, with a valid bit cleared
// by reset (an entry never set counts as expired). The C_res of an update
// uses the bCost after any re-initialisation.
// Timing: `done` and the outputs come one cycle after `start`.
module setrfm #(
  parameter int unsigned NDEST = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [$clog2(NDEST)-1:0] dest,
  input  logic [31:0]              cur_cost,
  input  logic [31:0]              bcost,     // stored best trip time
  input  logic [31:0]              now,       // low word of the node time
  input  logic [31:0]              bcost_tth,
  input  logic [31:0]              cost_sth,
  input  logic [4:0]               norm_shift,
  input  logic [2:0]               cres_max,
  input  logic [4:0]               cres_scale,
  output logic                     done,
  output logic [7:0]               r,
  output logic [7:0]               r_prime,
  output logic [31:0]              bcost_new,
  output logic                     bcost_wr,
  output logic                     expired,   // bCost was re-initialised
  output logic                     saturated  // curCost above size threshold
);
  logic [NDEST-1:0]       bvalid;
  logic [NDEST-1:0][31:0] btime;

  // Combinational evaluation of the flow.
  logic        c_fresh, c_better, c_sat, c_init;
  logic [31:0] c_diff, c_norm, c_beff, c_bshift;
  logic [7:0]  c_rp;
  logic [2:0]  c_cres;

  always_comb begin
    c_fresh  = bvalid[dest] && ((now - btime[dest]) < bcost_tth);
    c_better = cur_cost <= bcost;
    c_init   = !c_fresh || c_better;
    c_sat    = cur_cost > cost_sth;
    c_diff   = cur_cost - bcost;
    c_norm   = c_diff >> norm_shift;
    if (c_init)                 c_rp = 8'd0;
    else if (c_sat)             c_rp = 8'd255;
    else if (c_norm > 32'd255)  c_rp = 8'd255;
    else                        c_rp = c_norm[7:0];
    c_beff   = c_init ? cur_cost : bcost;
    c_bshift = c_beff >> cres_scale;
    c_cres   = (c_bshift >= {29'd0, cres_max}) ? 3'd0 : cres_max - c_bshift[2:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bvalid    <= '0;
      btime     <= '0;
      done      <= 1'b0;
      r         <= '0;
      r_prime   <= '0;
      bcost_new <= '0;
      bcost_wr  <= 1'b0;
      expired   <= 1'b0;
      saturated <= 1'b0;
    end else begin
      done <= start;
      if (start) begin
        r_prime   <= c_rp;
        r         <= (8'd255 - c_rp) >> c_cres;
        bcost_new <= c_beff;
        bcost_wr  <= c_init;
        expired   <= !c_fresh;
        saturated <= !c_init && c_sat;
        if (c_init) begin
          bvalid[dest] <= 1'b1;
          btime[dest]  <= now;
        end
      end
    end
  end
endmodule
