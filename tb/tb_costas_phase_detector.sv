// tb_costas_phase_detector: checks the decision-directed phase error.
//
// Random points of radius 12..30 at random angles are applied as (PS, QS) together
// with their -pi/4 rotation (PS45, QS45) computed here in floating point. The
// expected error is r*sin(angle - nearest point angle) rounded, computed from the
// point's angle; points within 6.75 degrees of a decision border are skipped, and a
// difference of up to 2 LSB is allowed for the rounding of the inputs. The output
// must follow its inputs by one clock.
module tb_costas_phase_detector;
  import tcm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  comp_t ps = '0, qs = '0, ps45 = '0, qs45 = '0;
  bm_t phase_err;

  costas_phase_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_pos = 0, n_neg = 0;
  localparam real PI = 3.14159265358979;

  function automatic int rnd(real v);
    return $rtoi($floor(v + 0.5));
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, a, x, y, sect, d;
    int e, near;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 3000; t++) begin
      r = 12.0 + real'($urandom_range(18));
      a = real'($urandom_range(35999)) / 36000.0 * 2.0 * PI;
      x = r * $cos(a);
      y = r * $sin(a);
      ps = comp_t'(rnd(x));
      qs = comp_t'(rnd(y));
      ps45 = comp_t'(rnd((x + y) / $sqrt(2.0)));
      qs45 = comp_t'(rnd((y - x) / $sqrt(2.0)));
      sect = a / (PI / 4.0);
      near = rnd(sect);
      d = (sect - real'(near)) * PI / 4.0;   // angle from the nearest point
      e = rnd(r * $sin(d));
      @(negedge clk);
      if ((sect - $floor(sect)) < 0.35 || (sect - $floor(sect)) > 0.65) begin
        checks++;
        if (int'(phase_err) - e > 2 || e - int'(phase_err) > 2) begin
          failures++;
          if (failures < 10) $display("FAIL r=%0f a=%0f err=%0d expected %0d", r, a, phase_err, e);
        end
        if (e > 2) n_pos++;
        if (e < -2) n_neg++;
      end
    end
    checks++;
    if (n_pos < 100 || n_neg < 100) begin failures++; $display("FAIL too few signed errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
