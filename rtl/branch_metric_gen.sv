// branch_metric_gen: the eight correlation branch metrics of 8-PSK.
//
// For the rotated, 6-bit received point (X, Y) it computes
//     m_i = X*cos(i*pi/4) + Y*sin(i*pi/4),   i = 0..7,
// the correlation of the point with the 8-PSK point i (larger is more likely).
// Even metrics are +-X and +-Y. Odd ones come from U = (X+Y)/sqrt2 and
// V = (Y-X)/sqrt2: m1 = U, m3 = V, m5 = -U, m7 = -V. The 1/sqrt2 factor is 181/256
// with round-half-up. All metrics lie in [-45, 45] and fit the 7-bit signed word
// of the published design.
//
// Timing: registered, one clock from (X, Y) to the metrics. Synchronous reset.
// The metric formula and the 7-bit width follow the published design; the 181/256
// approximation and the rounding are this design's choices. The 16-bit products
// are wider than their 7-bit results so the rounding cannot overflow; lint reports
// their unused upper bits.
module branch_metric_gen
  import tcm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  comp_t xs,
  input  comp_t ys,
  output bm_t   bm [NSTATES]
);

  logic signed [15:0] su, sv;
  bm_t x7, y7, u7, v7;

  always_comb begin
    x7 = bm_t'(xs);
    y7 = bm_t'(ys);
    su = ((16'(xs) + 16'(ys)) * 16'sd181 + 16'sd128) >>> 8;
    sv = ((16'(ys) - 16'(xs)) * 16'sd181 + 16'sd128) >>> 8;
    u7 = bm_t'(su);
    v7 = bm_t'(sv);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < NSTATES; i++) bm[i] <= '0;
    end else begin
      bm[0] <=  x7;
      bm[1] <=  u7;
      bm[2] <=  y7;
      bm[3] <=  v7;
      bm[4] <= -x7;
      bm[5] <= -u7;
      bm[6] <= -y7;
      bm[7] <= -v7;
    end
  end

endmodule
