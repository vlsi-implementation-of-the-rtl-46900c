// acs_unit: add-compare-select of the 8-state rate-2/3 TCM Viterbi decoder.
//
// Each state n has four predecessors {sel, n[2]} (sel = 0..3). The candidate path
// metric for each is the predecessor's state metric plus the branch metric of the
// 8-PSK point on that branch (tcm_pkg::branch_symbol); the largest of the four is
// the new state metric (metrics are correlations, so larger is better) and its
// sel is the state's 2-bit path selection value. Ties go to the lower sel.
//
// Metrics are 9-bit natural binary, as in the published design. The signed 7-bit branch
// metrics are offset by +64 so that they add as unsigned numbers; a common offset
// changes no decision. Normalisation follows the published design: when all eight new
// metrics are at least a quarter of the range (128), 128 is subtracted from each,
// which only maps the two most significant bits 01->00, 10->01, 11->10. With
// branch metrics in [19, 109] the spread of the metrics stays well under 384, so
// no metric can wrap; an assertion checks this.
//
// The most likely state is the one with the largest new metric (lowest index on a
// tie). It is registered together with the path selection bits, so both describe
// the same trellis step. Outputs are valid one clock after the branch metrics.
// Synchronous reset clears all metrics (no state favoured).
module acs_unit
  import tcm_pkg::*;
(
  input  logic   clk,
  input  logic   rst,
  input  bm_t    bm [NSTATES],
  output sel_t   path_sel [NSTATES],  // path selection bits, 2 per state
  output state_t ml_state,            // most likely state after this step
  output logic   renorm               // the step subtracted a quarter range
);

  localparam int unsigned QUARTER = 1 << (PM_W - 2);

  pm_t                 pm     [NSTATES];
  logic [PM_W:0]       best_v [NSTATES];
  sel_t                best_s [NSTATES];
  logic [PM_W:0]       cand;
  logic                all_high;
  pm_t                 pm_next [NSTATES];
  state_t              ml_next;

  // bm + 64 as a 7-bit unsigned number: invert the sign bit.
  function automatic logic [BM_W-1:0] offset_bm(bm_t b);
    return {~b[BM_W-1], b[BM_W-2:0]};
  endfunction

  always_comb begin
    all_high = 1'b1;
    for (int n = 0; n < NSTATES; n++) begin
      best_v[n] = '0;
      best_s[n] = '0;
      for (int s = 0; s < 4; s++) begin
        cand = {1'b0, pm[pred_state(state_t'(n), sel_t'(s))]}
             + (PM_W+1)'(offset_bm(bm[branch_symbol(state_t'(n), sel_t'(s))]));
        if (s == 0 || cand > best_v[n]) begin
          best_v[n] = cand;
          best_s[n] = sel_t'(s);
        end
      end
      if (best_v[n] < (PM_W+1)'(QUARTER)) all_high = 1'b0;
    end
    for (int n = 0; n < NSTATES; n++)
      pm_next[n] = all_high ? pm_t'(best_v[n] - (PM_W+1)'(QUARTER)) : pm_t'(best_v[n]);
    ml_next = '0;
    for (int n = 1; n < NSTATES; n++)
      if (pm_next[n] > pm_next[ml_next]) ml_next = state_t'(n);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int n = 0; n < NSTATES; n++) begin
        pm[n]       <= '0;
        path_sel[n] <= '0;
      end
      ml_state <= '0;
      renorm   <= 1'b0;
    end else begin
      for (int n = 0; n < NSTATES; n++) begin
        pm[n]       <= pm_next[n];
        path_sel[n] <= best_s[n];
      end
      ml_state <= ml_next;
      renorm   <= all_high;
    end
  end

  // No metric may leave the 9-bit range before normalisation.
  always_ff @(posedge clk) begin
    if (!rst) begin
      for (int n = 0; n < NSTATES; n++)
        assert (best_v[n] < (PM_W+1)'(1 << PM_W))
          else $error("acs_unit: path metric overflow in state %0d", n);
    end
  end

endmodule
