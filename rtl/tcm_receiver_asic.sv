// tcm_receiver_asic: Viterbi decoder for 8-state 8-PSK TCM with phase ambiguity
// resolution and a Costas loop phase detector (top level of the decoder chip).
//
// Data path, one symbol per clock:
//   P, Q (8 bit) -> phase_shifter (counter-rotate by k*pi/4, round to 6 bits)
//     -> branch_metric_gen (8 correlation metrics, 7 bit)
//     -> acs_unit (8 states, 9-bit metrics, 2 path selection bits per state,
//                  most likely state)
//     -> decoding_memory (three-RAM trace-back, reorder RAM) -> BIT1, BIT0.
// Phase ambiguity resolution: phase_sync_detector sums the best metric leaving the
// most likely state over 4096/8192 symbols, compares it with a threshold chosen by
// thr_sel and, on misalignment, raises alarm and steps the phase shift fed back to
// the phase shifter. costas_phase_detector uses the rotator's outputs to give the
// carrier phase error for the external Costas loop.
//
// Timing: the phase shifter, the branch metrics and the ACS are one register each;
// a symbol sampled on P, Q leaves as decoded bits 44 clocks later (3 + 41).
// The phase error follows P, Q by 2 clocks. Synchronous active-high reset.
// Block partition and wiring follow the published top-level block diagram; the reset,
// the dec_valid flag and the observation outputs (renorm, window_done, c_last) are
// this design's additions.
module tcm_receiver_asic
  import tcm_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  sample_t     p_in,          // in-phase ADC sample
  input  sample_t     q_in,          // quadrature ADC sample
  input  logic        thr_sel,       // 0: 5 dB threshold set, 1: 4 dB set
  output logic [1:0]  dec_bits,      // {BIT1, BIT0} = {x2, x1}
  output logic        dec_valid,
  output logic        alarm,         // misalignment / erasure flag
  output phase_t      phase_shift,   // current counter-rotation, units of pi/4
  output bm_t         costas_phase,  // carrier phase error
  output logic        renorm,        // path metrics normalised this step
  output logic        window_done,   // ambiguity-resolution window ended
  output logic signed [23:0] c_last  // decision variable of the last window
);

  comp_t  ps, qs, ps45, qs45;
  bm_t    bm [NSTATES];
  sel_t   path_sel [NSTATES];
  state_t ml_state;

  phase_shifter u_shift (
    .clk, .rst, .p_in, .q_in, .shift(phase_shift), .ps, .qs, .ps45, .qs45
  );

  branch_metric_gen u_bmg (
    .clk, .rst, .xs(ps), .ys(qs), .bm
  );

  acs_unit u_acs (
    .clk, .rst, .bm, .path_sel, .ml_state, .renorm
  );

  decoding_memory u_mem (
    .clk, .rst, .path_sel, .ml_state, .dec_bits, .dec_valid
  );

  phase_sync_detector u_para (
    .clk, .rst, .bm, .ml_state, .thr_sel, .phase_shift, .alarm, .window_done, .c_last
  );

  costas_phase_detector u_costas (
    .clk, .rst, .ps, .qs, .ps45, .qs45, .phase_err(costas_phase)
  );

endmodule
