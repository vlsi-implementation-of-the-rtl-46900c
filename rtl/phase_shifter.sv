// phase_shifter: counter-rotation of the demodulated constellation by k*pi/4.
//
// The 8-bit in-phase and quadrature samples (P, Q) are rotated by -k*pi/4, where k
// is the 3-bit phase shift chosen by the phase synchronisation detector, and the
// result is rounded to 6 bits (PS, QS) with saturation, as the published design describes:
// the rotated components keep the word length of the unrotated ones, so odd
// rotations clip the corners of the square (its Fig. 1).
//
// How: the even rotations are swaps and sign changes of (P, Q). The odd ones use
// A = (P+Q)/sqrt2 and B = (Q-P)/sqrt2, with 1/sqrt2 approximated by 181/256; the
// rotation by -pi/4 of (x, y) is (A, B), and the other odd rotations are swaps and
// sign changes of (A, B). Every candidate is held in units of 1/256 of an input LSB,
// then divided by 4*256 with round-half-up and saturated to [-32, 31].
// The same candidate set also gives the components rotated by -(k+1)*pi/4
// (PS45, QS45), which the Costas phase detector needs: the detector shares the
// rotator's gates, as in the published design.
//
// Timing: outputs are registered, one clock after (P, Q) and the phase shift.
// Reset (synchronous, active high) clears the outputs.
// The 181/256 constant, the rounding rule and the (PS45, QS45) pair are this
// design's choices; the published design gives only the 8-to-6-bit rounding after rotation.
module phase_shifter
  import tcm_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t p_in,
  input  sample_t q_in,
  input  phase_t  shift,      // counter-rotation in units of pi/4
  output comp_t   ps,         // rotated by -shift*pi/4
  output comp_t   qs,
  output comp_t   ps45,       // rotated by -(shift+1)*pi/4
  output comp_t   qs45
);

  localparam int W = 20;
  localparam logic signed [W-1:0] INV_SQRT2 = 20'sd181;   // 1/sqrt2 * 256

  logic signed [W-1:0] xp, xq, xa, xb;
  logic signed [W-1:0] cand_x [8];
  logic signed [W-1:0] cand_y [8];

  always_comb begin
    xp = W'(p_in) <<< 8;
    xq = W'(q_in) <<< 8;
    xa = (W'(p_in) + W'(q_in)) * INV_SQRT2;
    xb = (W'(q_in) - W'(p_in)) * INV_SQRT2;
    // rotation of (P, Q) by -k*pi/4, k = 0..7
    cand_x[0] =  xp;  cand_y[0] =  xq;
    cand_x[1] =  xa;  cand_y[1] =  xb;
    cand_x[2] =  xq;  cand_y[2] = -xp;
    cand_x[3] =  xb;  cand_y[3] = -xa;
    cand_x[4] = -xp;  cand_y[4] = -xq;
    cand_x[5] = -xa;  cand_y[5] = -xb;
    cand_x[6] = -xq;  cand_y[6] =  xp;
    cand_x[7] = -xb;  cand_y[7] =  xa;
  end

  // Divide by 1024 with round-half-up and saturate to the 6-bit range.
  function automatic comp_t round_sat(logic signed [W-1:0] v);
    logic signed [W-1:0] r;
    r = (v + W'(512)) >>> 10;
    if (r > W'(31))       return comp_t'(31);
    else if (r < -W'(32)) return comp_t'(-32);
    else                  return comp_t'(r);
  endfunction

  phase_t shift1;
  assign shift1 = shift + 3'd1;

  always_ff @(posedge clk) begin
    if (rst) begin
      ps <= '0; qs <= '0; ps45 <= '0; qs45 <= '0;
    end else begin
      ps   <= round_sat(cand_x[shift]);
      qs   <= round_sat(cand_y[shift]);
      ps45 <= round_sat(cand_x[shift1]);
      qs45 <= round_sat(cand_y[shift1]);
    end
  end

endmodule
