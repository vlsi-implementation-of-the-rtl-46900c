// tb_phase_sync_detector: checks the phase ambiguity resolution state machine.
//
// The branch metrics are driven directly. Each symbol a random most likely state
// is chosen; the four metrics of its parity (even or odd index) get values at most
// equal to a prescribed value v, one of them exactly v, while the other parity
// carries larger decoy values that must be ignored. Windows are built so that the
// sum of v is exactly at or one above the threshold in force:
//   1. reset, 32 skipped symbols, 4096 symbols summing to 79424 (= T): misaligned,
//      shift 0 -> 1, alarm stays high;
//   2. after 32 skipped symbols, 4096 symbols summing to 79425: aligned, alarm low;
//   3. 8192 symbols summing to 2*79424+1: stays aligned (long window, doubled T);
//   4. 4 dB setting, 8192 symbols summing to 2*78400: misaligned, shift 1 -> 2;
//   5. 4096 symbols summing to 78401: aligned.
// During skipped symbols the metrics are large, so counting them would show. The
// window_done pulse must come on the last symbol of each window and c_last must
// equal the prescribed sum.
module tb_phase_sync_detector;
  import tcm_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  bm_t bm [NSTATES];
  state_t ml_state = '0;
  logic thr_sel = 1'b0;
  phase_t phase_shift;
  logic alarm, window_done;
  logic signed [23:0] c_last;

  phase_sync_detector dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  task automatic check(bit ok, string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic drive_symbol(int v);
    int par, hit;
    ml_state = 3'($urandom);
    par = ml_state[0];
    hit = $urandom_range(3);
    for (int j = 0; j < 4; j++) begin
      bm[2 * j + par]     = bm_t'((j == hit) ? v : v - 1 - int'($urandom_range(20)));
      bm[2 * j + 1 - par] = bm_t'(v + 1 + int'($urandom_range(10)));
    end
  endtask

  // N symbols whose selected metrics sum to total; checks the done pulse timing
  task automatic window(int n, int total);
    int base, extra;
    base = total / n;
    extra = total - base * n;
    for (int k = 0; k < n; k++) begin
      drive_symbol(k < extra ? base + 1 : base);
      @(posedge clk);
      if (k == n - 1) check(window_done, $sformatf("no window_done at end of %0d window", n));
      else if (window_done) begin
        check(0, $sformatf("early window_done at symbol %0d of %0d", k, n));
      end
      @(negedge clk);
    end
    check(c_last == 24'(total), $sformatf("C = %0d expected %0d", c_last, total));
  endtask

  task automatic skip(int n);
    for (int k = 0; k < n; k++) begin
      drive_symbol(40);
      @(posedge clk);
      check(!window_done, "window_done while skipping");
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NSTATES; i++) bm[i] = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    check(alarm && phase_shift == 0, "reset state");

    skip(32);
    window(4096, 79424);
    check(alarm && phase_shift == 3'd1, "C = T must count as misaligned and rotate");

    skip(32);
    window(4096, 79425);
    check(!alarm && phase_shift == 3'd1, "C = T+1 must lock");

    window(8192, 2 * 79424 + 1);
    check(!alarm && phase_shift == 3'd1, "long window above 2T must stay locked");

    thr_sel = 1'b1;
    window(8192, 2 * 78400);
    check(alarm && phase_shift == 3'd2, "long window at 2T (4 dB) must rotate");

    skip(32);
    window(4096, 78401);
    check(!alarm && phase_shift == 3'd2, "4 dB short window above T must lock");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
