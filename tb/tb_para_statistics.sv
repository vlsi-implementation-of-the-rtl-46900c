// tb_para_statistics: statistics of the ambiguity-resolution estimator C' = C/N
// with Gaussian noise, at the receiver's default sizes. Two operating points are
// run, each from reset: Eb/N0 = 5 dB with the 5 dB threshold (thr_sel = 0) and
// Eb/N0 = 4 dB with the 4 dB threshold (thr_sel = 1).
//
// The transmitter model encodes random bits with the 8-state code and sends 8-PSK
// of radius 82 ADC units: with the 6-bit range standing for a saturation level of
// 0.78 and the constellation radius 0.5, this is 20.5 LSB after rounding. Noise is
// Gaussian (Box-Muller from $urandom) with sigma = 82 / sqrt(2 * Es/N0),
// Es/N0 = Eb/N0 + 3.01 dB (2 information bits per symbol).
//   H0: the channel is rotated by 5*pi/4; after acquisition 25 windows of 8192
//       symbols (204800 symbols) are observed. Mean and variance of C' and the bit
//       error rate of the decoded output are measured.
//   H1: the channel is kept one step of pi/4 ahead of the receiver's phase shift
//       after every rotation, so every window is misaligned; 50 windows of 4096
//       symbols are observed.
// Checks: the H0 mean lies above the normalised threshold (79424/4096 = 19.39 or
// 78400/4096 = 19.14)
// and the H1 mean below it, at most 3 of the 50 H1 windows are missed (the miss
// probability at this threshold is of the order of 1e-3 to 1e-2 per window), no
// H0 window raises a false alarm, and the H0 bit error rate is below 1e-2 (5 dB).
// At 4 dB up to 6 misses and a bit error rate up to 3e-2 are accepted.
// C' is normalised by the length of each window (8192 in H0, 4096 in H1, and
// 8192 for the window that follows a missed one).
module tb_para_statistics;
  import tcm_pkg::*;

  localparam int  LAT   = 44;
  localparam int  HIST  = 64;
  localparam real PI    = 3.14159265358979;

  logic clk = 1'b0, rst = 1'b1;
  sample_t p_in = '0, q_in = '0;
  logic thr_sel = 1'b0;
  logic [1:0] dec_bits;
  logic dec_valid, alarm, renorm, window_done;
  phase_t phase_shift;
  bm_t costas_phase;
  logic signed [23:0] c_last;

  tcm_receiver_asic dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cycle = 0;
  state_t enc_state = '0;
  sel_t hist [HIST];
  int rot = 5;
  real sigma, amp = 82.0;
  // received power (signal + noise) held by the AGC: radius 82 at Eb/N0 = 5 dB
  real ptot = 82.0 * 82.0 * (1.0 + 1.0 / $pow(10.0, (5.0 + 10.0 * $log10(2.0)) / 10.0));
  bit count_bits = 0;
  longint n_bits = 0, n_err = 0;

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom) + 1.0) / 4294967297.0;
    u2 = real'($urandom) / 4294967296.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(2.0 * PI * u2);
  endfunction

  always @(negedge clk) begin
    sel_t x;
    logic [2:0] sym;
    real ang;
    int pi_, qi_;
    if (!rst && count_bits && dec_valid) begin
      sel_t e;
      e = dec_bits ^ hist[(cycle - LAT) % HIST];
      n_bits += 2;
      n_err += longint'(e[0]) + longint'(e[1]);
    end
    x = 2'($urandom);
    sym = {x, enc_state[0]};
    hist[cycle % HIST] = x;
    enc_state = next_state(enc_state, x);
    ang = (real'(sym) + real'(rot)) * PI / 4.0;
    pi_ = $rtoi($floor(amp * $cos(ang) + sigma * gauss() + 0.5));
    qi_ = $rtoi($floor(amp * $sin(ang) + sigma * gauss() + 0.5));
    if (pi_ > 127) pi_ = 127;
    if (pi_ < -128) pi_ = -128;
    if (qi_ > 127) qi_ = 127;
    if (qi_ < -128) qi_ = -128;
    p_in = sample_t'(pi_);
    q_in = sample_t'(qi_);
    cycle++;
  end

  initial begin : watchdog
    repeat (2400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_point(real ebn0_db, logic sel, real thr, int max_missed, real max_ber);
    real esn0, c, s0, s1, mean0, var0, mean1, var1, tnorm, ber;
    int k, false_alarms, missed;
    logic was_alarm;
    esn0 = $pow(10.0, (ebn0_db + 10.0 * $log10(2.0)) / 10.0);
    // AGC: total power fixed at its value for radius 82 at 5 dB
    amp = $sqrt(ptot / (1.0 + 1.0 / esn0));
    sigma = amp / $sqrt(2.0 * esn0);
    tnorm = thr / 4096.0;
    rst = 1'b1;
    thr_sel = sel;
    rot = 5;
    n_bits = 0;
    n_err = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // H0: acquire, then observe 25 long windows
    k = 0;
    while (alarm && k < 16) begin
      @(posedge clk iff window_done);
      @(negedge clk);
      k++;
    end
    checks++;
    if (alarm || phase_shift != 3'(rot)) begin
      failures++;
      $display("FAIL: no acquisition (shift %0d)", phase_shift);
    end
    repeat (200) @(negedge clk);
    count_bits = 1;
    s0 = 0.0; s1 = 0.0; false_alarms = 0;
    for (int w = 0; w < 25; w++) begin
      @(posedge clk iff window_done);
      @(negedge clk);
      c = real'(c_last) / 8192.0;
      s0 += c; s1 += c * c;
      if (alarm) begin
        false_alarms++;
        rot = int'(phase_shift);   // keep the channel aligned with the new shift
      end
    end
    count_bits = 0;
    mean0 = s0 / 25.0;
    var0 = s1 / 25.0 - mean0 * mean0;
    ber = real'(n_err) / real'(n_bits);

    // H1: keep the channel one pi/4 step ahead of the receiver
    rot = (int'(phase_shift) + 1) % 8;
    k = 0;
    while (!alarm && k < 4) begin       // long windows until the loss is declared
      @(posedge clk iff window_done);
      @(negedge clk);
      rot = (int'(phase_shift) + 1) % 8;
      k++;
    end
    s0 = 0.0; s1 = 0.0; missed = 0;
    for (int w = 0; w < 50; w++) begin
      was_alarm = alarm;
      @(posedge clk iff window_done);
      @(negedge clk);
      c = real'(c_last) / (was_alarm ? 4096.0 : 8192.0);
      s0 += c; s1 += c * c;
      if (!alarm) missed++;
      if (!alarm) $display("H1 window %0d: C' = %0.4f not detected", w, c);
      rot = (int'(phase_shift) + 1) % 8;
    end
    mean1 = s0 / 50.0;
    var1 = s1 / 50.0 - mean1 * mean1;

    $display("Eb/N0 = %0.1f dB, radius = %0.2f, sigma = %0.2f ADC LSB, threshold T' = %0.4f",
             ebn0_db, amp, sigma, tnorm);
    $display("H0: mean C' = %0.4f  variance = %0.5f  false alarms = %0d  BER = %0.2e (%0d bits)",
             mean0, var0, false_alarms, ber, n_bits);
    $display("H1: mean C' = %0.4f  variance = %0.5f  missed = %0d of 50", mean1, var1, missed);
    checks++; if (!(mean0 > tnorm)) begin failures++; $display("FAIL: H0 mean below threshold"); end
    checks++; if (!(mean1 < tnorm)) begin failures++; $display("FAIL: H1 mean above threshold"); end
    checks++; if (false_alarms != 0) begin failures++; $display("FAIL: false alarm in H0"); end
    checks++; if (missed > max_missed) begin failures++; $display("FAIL: too many misaligned windows missed"); end
    checks++; if (!(ber < max_ber)) begin failures++; $display("FAIL: BER too high"); end
  endtask

  initial begin
    run_point(5.0, 1'b0, 79424.0, 3, 1.0e-2);
    run_point(4.0, 1'b1, 78400.0, 6, 3.0e-2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
