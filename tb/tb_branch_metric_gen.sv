// tb_branch_metric_gen: checks the eight correlation metrics.
//
// Every (X, Y) pair of the 6-bit range is applied once. The expected metric is
// X cos(i pi/4) + Y sin(i pi/4) in floating point, rounded to the nearest integer;
// even metrics must match exactly and odd ones within one LSB (181/256 for
// 1/sqrt2). Every metric must fit the 7-bit signed range and appear one clock
// after its inputs. It also checks that the metric of the point nearest in angle
// is never below another metric (points well inside a sector).
module tb_branch_metric_gen;
  import tcm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  comp_t xs = '0, ys = '0;
  bm_t bm [NSTATES];

  branch_metric_gen dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a, v;
    int e, tol, imax, inear;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int x = -32; x < 32; x++) begin
      for (int y = -32; y < 32; y++) begin
        xs = comp_t'(x); ys = comp_t'(y);
        @(negedge clk);
        imax = 0;
        for (int i = 0; i < 8; i++) begin
          a = real'(i) * 3.14159265358979 / 4.0;
          v = real'(x) * $cos(a) + real'(y) * $sin(a);
          e = $rtoi($floor(v + 0.5 + 1.0e-6));
          tol = i % 2;
          checks++;
          if (int'(bm[i]) - e > tol || e - int'(bm[i]) > tol) begin
            failures++;
            if (failures < 10) $display("FAIL m%0d(%0d,%0d) = %0d expected %0d", i, x, y, bm[i], e);
          end
          if (bm[i] > bm[imax]) imax = i;
        end
        // nearest point by angle, away from sector borders
        if ((x != 0 || y != 0) && (x * x + y * y) > 100) begin
          a = $atan2(real'(y), real'(x));
          if (a < 0) a = a + 2.0 * 3.14159265358979;
          v = a / (3.14159265358979 / 4.0);
          inear = $rtoi($floor(v + 0.5)) % 8;
          if ((v - $floor(v)) > 0.55 || (v - $floor(v)) < 0.45) begin
            checks++;
            if (bm[inear] < bm[imax]) begin
              failures++;
              $display("FAIL largest metric %0d, nearest point %0d at (%0d,%0d)", imax, inear, x, y);
            end
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
