// tb_phase_shifter: checks the counter-rotation and 8-to-6-bit rounding.
//
// For random (P, Q) and every phase shift k the expected outputs are computed in
// floating point: (P cos a + Q sin a, -P sin a + Q cos a) with a = k*pi/4, divided
// by 4, rounded half up and saturated to [-32, 31]. Even k must match exactly; odd
// k may differ by one LSB because the hardware uses 181/256 for 1/sqrt2. The
// (PS45, QS45) pair is checked the same way against k+1. Outputs must appear one
// clock after the inputs. Corner values (+-127, -128) are included.
module tb_phase_shifter;
  import tcm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  sample_t p_in = '0, q_in = '0;
  phase_t shift = '0;
  comp_t ps, qs, ps45, qs45;

  phase_shifter dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  function automatic int expect_comp(int p, int q, int k, bit y);
    real a, v;
    int r;
    a = real'(k) * 3.14159265358979 / 4.0;
    v = y ? (-real'(p) * $sin(a) + real'(q) * $cos(a)) : (real'(p) * $cos(a) + real'(q) * $sin(a));
    r = $rtoi($floor(v / 4.0 + 0.5 + 1.0e-6));
    if (r > 31) r = 31;
    if (r < -32) r = -32;
    return r;
  endfunction

  task automatic check(string what, int got, int exp, int tol);
    checks++;
    if (got - exp > tol || exp - got > tol) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (P=%0d Q=%0d k=%0d)", what, got, exp,
               p_in, q_in, shift);
    end
  endtask

  initial begin
    repeat (600) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p, q, k, tol, k1;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 400; t++) begin
      if (t < 8)       begin p = 127;  q = 127;  end
      else if (t < 16) begin p = -128; q = -128; end
      else if (t < 24) begin p = -128; q = 127;  end
      else begin p = int'($urandom_range(255)) - 128; q = int'($urandom_range(255)) - 128; end
      k = t % 8;
      p_in = sample_t'(p); q_in = sample_t'(q); shift = phase_t'(k);
      @(negedge clk);
      // one clock later the outputs belong to these inputs
      k1 = (k + 1) % 8;
      tol = (k % 2 == 1) ? 1 : 0;
      check("PS",   int'(ps),   expect_comp(p, q, k, 0), tol);
      check("QS",   int'(qs),   expect_comp(p, q, k, 1), tol);
      check("PS45", int'(ps45), expect_comp(p, q, k1, 0), 1 - tol);
      check("QS45", int'(qs45), expect_comp(p, q, k1, 1), 1 - tol);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
