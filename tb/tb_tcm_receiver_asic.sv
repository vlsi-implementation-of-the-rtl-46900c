// tb_tcm_receiver_asic: end-to-end test of the TCM receiver at its default sizes
// (4096/8192-symbol ambiguity windows, thresholds 79424/78400).
//
// A behavioural transmitter encodes random bit pairs with the 8-state code
// (parity checks h2=4, h1=2, h0=11 octal), maps them on 8-PSK of radius 82 in
// ADC units (20.5 LSB after rounding to 6 bits), rotates the constellation by a
// multiple of pi/4 plus an optional small carrier phase offset, and adds uniform
// noise. The test:
//   1. starts with a 3*pi/4 rotation; the receiver must step its phase shift to 3,
//      drop the alarm, and then decode every bit pair exactly (44-clock latency);
//   2. stays locked through long (8192-symbol) windows;
//   3. applies small positive and negative carrier offsets and checks the sign of
//      the mean Costas phase error;
//   4. jumps the carrier by 5*pi/4 (a cycle skip) with the 4 dB threshold selected;
//      the receiver must raise the alarm, re-acquire at shift 0 and decode again.
// It counts each mechanism (rotation steps, short and long windows, H1->H0 and
// H0->H1 transitions, metric normalisations, both threshold settings) and fails
// if one never happened.
module tb_tcm_receiver_asic;
  import tcm_pkg::*;

  localparam int LAT   = 44;      // negedge-to-negedge latency from P,Q to bits
  localparam int AMP   = 82;
  localparam int NOISE = 8;
  localparam int HIST  = 64;

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
  int n_rot_steps = 0, n_short_win = 0, n_long_win = 0, n_h1_to_h0 = 0, n_h0_to_h1 = 0;
  int n_renorm = 0, n_thr5 = 0, n_thr4 = 0, n_bits_checked = 0, n_bit_err = 0;
  longint cycle = 0;

  // transmitter state
  state_t enc_state = '0;
  sel_t   hist [HIST];
  int     rot = 3;
  real    delta = 0.0;
  bit     compare_on = 0;
  real    costas_sum = 0.0;
  int     costas_n = 0;
  phase_t last_shift = '0;
  logic   last_alarm = 1'b1;

  task automatic fail(string msg);
    failures++;
    $display("FAIL @%0d: %s", cycle, msg);
  endtask

  // drive one symbol per clock on the falling edge, check outputs there as well
  always @(negedge clk) begin
    sel_t x;
    logic [2:0] sym;
    real ang;
    int pi_, qi_;
    if (!rst) begin
      // outputs of the previous rising edge
      if (compare_on && dec_valid) begin
        checks++;
        n_bits_checked++;
        if (dec_bits !== hist[(cycle - LAT) % HIST]) begin
          n_bit_err++;
          if (n_bit_err < 10) fail($sformatf("decoded %b expected %b", dec_bits,
                                             hist[(cycle - LAT) % HIST]));
          else failures++;
        end
      end
      costas_sum += real'(costas_phase);
      costas_n++;
    end
    // new symbol
    x = 2'($urandom);
    sym = {x, enc_state[0]};
    hist[cycle % HIST] = x;
    enc_state = next_state(enc_state, x);
    ang = (real'(sym) + real'(rot)) * 3.14159265358979 / 4.0 + delta;
    pi_ = $rtoi($floor(AMP * $cos(ang) + 0.5)) + int'($urandom_range(2 * NOISE)) - NOISE;
    qi_ = $rtoi($floor(AMP * $sin(ang) + 0.5)) + int'($urandom_range(2 * NOISE)) - NOISE;
    p_in = sample_t'(pi_);
    q_in = sample_t'(qi_);
    cycle++;
  end

  // mechanism counters
  always @(posedge clk) if (!rst) begin
    if (renorm) n_renorm++;
    if (window_done) begin
      if (alarm) n_short_win++; else n_long_win++;
      if (thr_sel) n_thr4++; else n_thr5++;
    end
  end
  always @(negedge clk) if (!rst) begin
    if (phase_shift != last_shift) begin
      n_rot_steps++;
      if (phase_shift != last_shift + 3'd1) fail("phase shift did not advance by one step");
    end
    if (last_alarm && !alarm) n_h1_to_h0++;
    if (!last_alarm && alarm) n_h0_to_h1++;
    last_shift = phase_shift;
    last_alarm = alarm;
  end

  task automatic wait_windows(int n);
    repeat (n) @(posedge clk iff window_done);
  endtask

  task automatic wait_lock(int max_windows);
    int k = 0;
    while (alarm && k < max_windows) begin
      @(posedge clk iff window_done);
      k++;
      @(negedge clk);
    end
  endtask

  task automatic costas_mean(output real m);
    costas_sum = 0.0; costas_n = 0;
    repeat (2000) @(negedge clk);
    m = costas_sum / real'(costas_n);
  endtask

  initial begin : watchdog
    repeat (600000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real m;
    repeat (4) @(negedge clk);
    rst = 1'b0;

    // 1. acquisition from a 3*pi/4 rotation
    wait_lock(12);
    checks++;
    if (alarm) fail("no lock after 12 windows");
    checks++;
    if (phase_shift != 3'(rot)) fail($sformatf("locked at shift %0d, rotation %0d", phase_shift, rot));
    $display("locked: shift=%0d C'=%0f cycle=%0d", phase_shift, real'(c_last) / 4096.0, cycle);
    repeat (100) @(negedge clk);
    compare_on = 1;

    // 2. two long windows in lock
    wait_windows(2);
    checks++;
    if (alarm) fail("false alarm while locked");
    $display("locked C'=%0f", real'(c_last) / 8192.0);

    // 3. Costas detector sign
    delta = 0.08;
    costas_mean(m);
    checks++;
    if (!(m > 0.5)) fail($sformatf("Costas mean %0f for +0.08 rad", m));
    delta = -0.08;
    costas_mean(m);
    checks++;
    if (!(m < -0.5)) fail($sformatf("Costas mean %0f for -0.08 rad", m));
    delta = 0.0;
    costas_mean(m);
    checks++;
    if (!(m > -0.5 && m < 0.5)) fail($sformatf("Costas mean %0f for 0 rad", m));

    // 4. carrier cycle skip by 5*pi/4 with the 4 dB thresholds
    compare_on = 0;
    thr_sel = 1'b1;
    rot = (rot + 5) % 8;
    @(posedge clk iff (window_done && alarm));
    $display("misalignment detected: C'=%0f cycle=%0d", real'(c_last) / 8192.0, cycle);
    wait_lock(12);
    checks++;
    if (alarm) fail("no re-lock after cycle skip");
    checks++;
    if (phase_shift != 3'(rot)) fail($sformatf("re-locked at shift %0d, rotation %0d", phase_shift, rot));
    repeat (100) @(negedge clk);
    compare_on = 1;
    wait_windows(1);
    compare_on = 0;

    $display("rot_steps=%0d short_win=%0d long_win=%0d h1->h0=%0d h0->h1=%0d renorm=%0d thr5=%0d thr4=%0d bits=%0d bit_err=%0d",
             n_rot_steps, n_short_win, n_long_win, n_h1_to_h0, n_h0_to_h1, n_renorm,
             n_thr5, n_thr4, n_bits_checked, n_bit_err);
    checks++; if (n_rot_steps == 0)    fail("no phase rotation step");
    checks++; if (n_short_win == 0)    fail("no 4096-symbol window");
    checks++; if (n_long_win == 0)     fail("no 8192-symbol window");
    checks++; if (n_h1_to_h0 < 2)      fail("fewer than two acquisitions");
    checks++; if (n_h0_to_h1 == 0)     fail("no misalignment detected in lock");
    checks++; if (n_renorm == 0)       fail("no path metric normalisation");
    checks++; if (n_thr5 == 0 || n_thr4 == 0) fail("a threshold setting never used");
    checks++; if (n_bits_checked < 1000) fail("too few decoded bits checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
