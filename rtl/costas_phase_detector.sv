// costas_phase_detector: decision-directed 8-PSK carrier phase detector.
//
// The detector sees the rotated received point (X, Y) = (PS, QS) and the same point
// rotated by a further -pi/4, (U, V) = (PS45, QS45), both from the phase shifter,
// so it needs no multiplier of its own. The correlations with the eight 8-PSK
// points are  m = X, U, Y, V, -X, -U, -Y, -V  with U = (X+Y)/sqrt2,
// V = (Y-X)/sqrt2. The nearest point i is
// the one with the largest correlation, and the phase error is the imaginary
// part of the received point in the frame of that point, Y cos(phi_i) - X sin(phi_i),
// which is simply m_(i+2). For a small offset e ~ r*sin(dphi): positive when the
// point lies counter-clockwise of the decision. At low signal-to-noise ratio
// more decisions are wrong and the mean slope of the detector falls, which gives
// the adaptive gain the published design reports for its detector.
//
// Timing: registered, one clock. Output is signed, 7 bits, in LSBs of the 6-bit
// components; it drives the external loop amplifier, filter and VCO.
// The published design gives only the detector's purpose, its sharing of the rotator and
// its gain behaviour; this decision-directed structure is this design's choice.
module costas_phase_detector
  import tcm_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  comp_t ps,
  input  comp_t qs,
  input  comp_t ps45,
  input  comp_t qs45,
  output bm_t   phase_err
);

  bm_t m [8];
  logic [2:0] imax;

  always_comb begin
    m[0] =  bm_t'(ps);
    m[1] =  bm_t'(ps45);
    m[2] =  bm_t'(qs);
    m[3] =  bm_t'(qs45);
    m[4] = -bm_t'(ps);
    m[5] = -bm_t'(ps45);
    m[6] = -bm_t'(qs);
    m[7] = -bm_t'(qs45);
    imax = '0;
    for (int i = 1; i < 8; i++)
      if (m[i] > m[imax]) imax = 3'(i);
  end

  always_ff @(posedge clk) begin
    if (rst) phase_err <= '0;
    else     phase_err <= m[imax + 3'd2];
  end

endmodule
