// phase_sync_detector: phase ambiguity resolution by branch metric observation.
//
// Every symbol the detector takes the largest branch metric leaving the most
// likely state: the four even metrics if that state's LSB is 0, the four odd ones
// otherwise (the LSB of a state is the z0 bit of its outgoing branches). It sums
// this metric over a window of N symbols, C = sum m_k, and at the end of the
// window compares C with a threshold T:
//   C > T  -> hypothesis H0, correct phase: alarm low;
//   C <= T -> hypothesis H1, misalignment: alarm high and the phase shift
//             advances by one step of pi/4, counter-rotating the constellation.
// N is 4096 symbols while the alarm is high (fast acquisition) and 8192 while it
// is low (fewer false alarms). thr_sel picks one of two thresholds for the 4096
// window (79424 for 5 dB, 78400 for 4 dB); the 8192 window uses twice the value.
// After reset and after every rotation the first SETTLE symbols are not summed,
// so the Viterbi decoder can settle on the new phase (the k = L lower limit of the
// sum). The alarm is available outside as the misalignment / erasure flag.
//
// Timing: bm and ml_state must describe the same step (the ACS registers the
// state one clock after it uses the metrics of the previous symbol, which is what
// the top level provides). phase_shift and alarm change on the clock edge that
// ends a window. Reset: alarm high (H1), phase shift 0.
// Window lengths, thresholds and the even/odd selection are the published design's; the
// doubled threshold for the long window (the published design's 5 dB table gives 79378
// and 158755), the settling gap and the reset state are this design's choices.
// Only the LSB of ml_state is used; the full state is taken so that the port
// matches the most-likely-state bus of the decoder (lint reports the unused bits).
module phase_sync_detector
  import tcm_pkg::*;
#(
  parameter int unsigned N_SHORT = 4096,     // window in H1 status
  parameter int unsigned N_LONG  = 8192,     // window in H0 status
  parameter int unsigned T_5DB   = 79424,    // threshold for N_SHORT, thr_sel = 0
  parameter int unsigned T_4DB   = 78400,    // threshold for N_SHORT, thr_sel = 1
  parameter int unsigned SETTLE  = 32        // symbols skipped after a rotation
) (
  input  logic   clk,
  input  logic   rst,
  input  bm_t    bm [NSTATES],
  input  state_t ml_state,
  input  logic   thr_sel,
  output phase_t phase_shift,
  output logic   alarm,         // 1: misalignment (H1)
  output logic   window_done,   // pulses on the last symbol of a window
  output logic signed [23:0] c_last   // C of the last complete window
);

  localparam int unsigned CNT_W = $clog2(N_LONG + SETTLE + 1) + 1;

  typedef logic signed [23:0] acc_t;

  acc_t             acc, acc_next, thr;
  logic [CNT_W-1:0] cnt, win_len;
  logic             settling;
  bm_t              best;

  // best of the four even (ml_state[0] = 0) or odd metrics
  always_comb begin
    best = bm[{2'b00, ml_state[0]}];
    for (int j = 1; j < 4; j++)
      if (bm[{2'(j), ml_state[0]}] > best) best = bm[{2'(j), ml_state[0]}];
  end

  always_comb begin
    win_len  = alarm ? CNT_W'(N_SHORT) : CNT_W'(N_LONG);
    thr      = thr_sel ? acc_t'(T_4DB) : acc_t'(T_5DB);
    if (!alarm) thr = thr <<< 1;
    acc_next = acc + acc_t'(best);
  end

  assign window_done = !settling && (cnt == win_len - 1'b1);

  always_ff @(posedge clk) begin
    if (rst) begin
      acc         <= '0;
      cnt         <= '0;
      settling    <= 1'b1;
      alarm       <= 1'b1;
      phase_shift <= '0;
      c_last      <= '0;
    end else if (settling) begin
      cnt <= cnt + 1'b1;
      if (cnt == CNT_W'(SETTLE) - 1'b1 || SETTLE == 0) begin
        settling <= 1'b0;
        cnt      <= '0;
      end
    end else if (window_done) begin
      acc    <= '0;
      cnt    <= '0;
      c_last <= acc_next;
      if (acc_next > thr) begin
        alarm <= 1'b0;
      end else begin
        alarm       <= 1'b1;
        phase_shift <= phase_shift + 3'd1;
        settling    <= 1'b1;
      end
    end else begin
      acc <= acc_next;
      cnt <= cnt + 1'b1;
    end
  end

endmodule
