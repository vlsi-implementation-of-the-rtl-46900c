// tb_acs_unit: checks the add-compare-select against an unbounded reference.
//
// The reference keeps the eight path metrics as 32-bit integers with no
// normalisation, adds the offset branch metric of each of the four branches
// entering a state (predecessor {sel, n[2]}, 8-PSK point {n[1]^sel[1],
// n[0]^sel[0], n[2]}), and keeps the largest (lower sel on a tie). Each clock the
// hardware's path selection bits, most likely state (largest metric, lowest index
// on a tie) and normalisation flag must equal the reference, where the flag is
// expected whenever all reference metrics minus the quarter-range subtractions
// made so far are at least 128. Branch metrics come from random points on a
// circle of radius 20 with noise, and from uniformly random values in [-45, 45].
module tb_acs_unit;
  import tcm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  bm_t bm [NSTATES];
  sel_t path_sel [NSTATES];
  state_t ml_state;
  logic renorm;

  acs_unit dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_renorm = 0;
  longint ref_pm [NSTATES];
  longint offset = 0;

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint nxt [NSTATES];
    int     exp_sel [NSTATES];
    longint c, mn;
    int     exp_ml;
    bit     exp_norm;
    real    ang, x, y;
    for (int n = 0; n < NSTATES; n++) begin ref_pm[n] = 0; bm[n] = '0; end
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 20000; t++) begin
      if (t < 10000) begin
        ang = real'($urandom_range(7)) * 3.14159265358979 / 4.0;
        x = 20.0 * $cos(ang) + real'(int'($urandom_range(16)) - 8);
        y = 20.0 * $sin(ang) + real'(int'($urandom_range(16)) - 8);
        for (int i = 0; i < 8; i++) begin
          c = longint'($floor(x * $cos(i * 3.14159265358979 / 4.0)
                            + y * $sin(i * 3.14159265358979 / 4.0) + 0.5));
          if (c > 45) c = 45;
          if (c < -45) c = -45;
          bm[i] = bm_t'(c);
        end
      end else begin
        for (int i = 0; i < 8; i++) bm[i] = bm_t'(int'($urandom_range(90)) - 45);
      end
      // reference step
      for (int n = 0; n < NSTATES; n++) begin
        for (int s = 0; s < 4; s++) begin
          c = ref_pm[{s[1:0], n[2]}] + longint'(bm[{n[1] ^ s[1], n[0] ^ s[0], n[2]}]) + 64;
          if (s == 0 || c > nxt[n]) begin nxt[n] = c; exp_sel[n] = s; end
        end
      end
      mn = nxt[0];
      exp_ml = 0;
      for (int n = 1; n < NSTATES; n++) begin
        if (nxt[n] < mn) mn = nxt[n];
        if (nxt[n] > nxt[exp_ml]) exp_ml = n;
      end
      exp_norm = (mn - offset) >= 128;
      if (exp_norm) offset += 128;
      for (int n = 0; n < NSTATES; n++) ref_pm[n] = nxt[n];
      @(negedge clk);
      for (int n = 0; n < NSTATES; n++) begin
        checks++;
        if (int'(path_sel[n]) != exp_sel[n]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d state %0d sel %0d expected %0d", t, n, path_sel[n], exp_sel[n]);
        end
      end
      checks++;
      if (int'(ml_state) != exp_ml) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d ml_state %0d expected %0d", t, ml_state, exp_ml);
      end
      checks++;
      if (renorm != exp_norm) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d renorm %0b expected %0b", t, renorm, exp_norm);
      end
      if (renorm) n_renorm++;
    end
    checks++;
    if (n_renorm < 100) begin failures++; $display("FAIL too few normalisations"); end
    $display("normalisations: %0d", n_renorm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
