// tb_decoding_memory: checks the three-RAM trace-back memory on a known path.
//
// A random bit-pair sequence drives the trellis encoder model. Each column gives,
// for the state the encoder enters, the selection bits that point to the state it
// came from; all other states get random selection bits. The most likely state is
// the true state on every tenth column (the last of each block, the only one the
// trace-back starts from) and random elsewhere. The decoded output must reproduce
// the bit pairs in order, 41 clocks after their column,
// and dec_valid must rise at the first of them.
module tb_decoding_memory;
  import tcm_pkg::*;

  localparam int LAT  = 41;
  localparam int HIST = 64;

  logic clk = 1'b0, rst = 1'b1;
  sel_t path_sel [NSTATES];
  state_t ml_state;
  sel_t dec_bits;
  logic dec_valid;

  decoding_memory dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_valid = 0;
  sel_t hist [HIST];

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    state_t s, n;
    sel_t x;
    for (int i = 0; i < NSTATES; i++) path_sel[i] = '0;
    ml_state = '0;
    s = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int t = 0; t < 2000; t++) begin
      // outputs produced by the previous edges
      checks++;
      if (dec_valid != (t >= LAT)) begin
        failures++;
        $display("FAIL t=%0d dec_valid=%0b", t, dec_valid);
      end
      if (t >= LAT) begin
        n_valid++;
        checks++;
        if (dec_bits != hist[(t - LAT) % HIST]) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d bits %b expected %b", t, dec_bits, hist[(t - LAT) % HIST]);
        end
      end
      // new column
      x = 2'($urandom);
      hist[t % HIST] = x;
      n = next_state(s, x);
      for (int i = 0; i < NSTATES; i++) path_sel[i] = 2'($urandom);
      path_sel[n] = s[2:1];
      ml_state = (t % 10 == 9) ? n : 3'($urandom);
      s = n;
      @(negedge clk);
    end
    $display("decoded pairs checked: %0d", n_valid);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
