// tcm_pkg: shared widths, types and trellis functions of the 8-PSK TCM receiver.
//
// The code is the 8-state, rate-2/3 Ungerboeck code with parity-check polynomials
// h2 = 4, h1 = 2, h0 = 11 (octal), realised as a systematic feedback encoder with
// three delay cells r1, r2, r3:
//     z0 = r3,   r1' = r3,   r2' = r1 ^ x2,   r3' = r2 ^ x1,   z1 = x1,  z2 = x2.
// It satisfies z0(n) = z0(n-3) ^ z1(n-1) ^ z2(n-2), i.e. the parity check above.
// A state is numbered s = {r1, r2, r3}, so its least significant bit is the z0 of
// every branch leaving it: the LSB of a state tells whether its four outgoing
// branches carry the even or the odd 8-PSK points (natural mapping, point i at
// angle i*pi/4, label {z2,z1,z0} = i). Every state has four predecessors,
// {a, b, n[2]} for a,b in {0,1}; the 2-bit "path selection" value of a state is
// {a, b} of the predecessor chosen by the ACS.
//
// The code polynomials, the 8-bit input, 6-bit rotated components, 7-bit branch
// metrics and 9-bit path metrics are the published design's; the state numbering and
// encoder realisation are this design's own choice (any realisation of the same
// parity checks is equivalent).
package tcm_pkg;

  localparam int unsigned NSTATES = 8;   // trellis states
  localparam int unsigned IN_W    = 8;   // ADC samples P, Q
  localparam int unsigned IQ_W    = 6;   // components after rotation and rounding
  localparam int unsigned BM_W    = 7;   // branch metric width (signed)
  localparam int unsigned PM_W    = 9;   // path metric width (natural binary)
  localparam int unsigned BLK     = 10;  // trace-back RAM depth (symbols per block)

  typedef logic signed [IN_W-1:0] sample_t;
  typedef logic signed [IQ_W-1:0] comp_t;
  typedef logic signed [BM_W-1:0] bm_t;
  typedef logic        [PM_W-1:0] pm_t;
  typedef logic        [2:0]      state_t;
  typedef logic        [2:0]      phase_t;
  typedef logic        [1:0]      sel_t;

  // 8-PSK point carried by the branch entering state n from predecessor {sel, n[2]}.
  function automatic logic [2:0] branch_symbol(state_t n, sel_t sel);
    return {n[1] ^ sel[1], n[0] ^ sel[0], n[2]};
  endfunction

  // Predecessor of state n selected by sel.
  function automatic state_t pred_state(state_t n, sel_t sel);
    return {sel, n[2]};
  endfunction

  // Information bits {x2, x1} of the branch entering n from {sel, n[2]}.
  function automatic sel_t info_bits(state_t n, sel_t sel);
    return {n[1] ^ sel[1], n[0] ^ sel[0]};
  endfunction

  // Encoder next state for information bits x = {x2, x1}.
  function automatic state_t next_state(state_t s, sel_t x);
    return {s[0], s[2] ^ x[1], s[1] ^ x[0]};
  endfunction

endpackage
