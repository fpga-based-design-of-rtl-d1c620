// Testbench of dtmf_detector at its full 250-sample block: each of the 16 keys is played
// as a pair of sine tones (amplitudes and phases varied, with a little noise) for two
// blocks, and the detector must report that key's code. Silence, a single tone and
// strong broadband noise must not produce a digit, and a digit with a strong 60 Hz hum
// added must be rejected by the zero-crossing test. Samples are 6 clocks apart.
module tb_dtmf_detector;
  import hearing_aid_pkg::*;
  localparam int NB = 250;
  localparam real FS = 10000.0;
  localparam real PI = 3.14159265358979;
  localparam real ROWF [4] = '{697.0, 770.0, 852.0, 941.0};
  localparam real COLF [4] = '{1209.0, 1336.0, 1477.0, 1633.0};

  logic clk = 0, rst_n = 0, x_valid = 0;
  sample_t x = '0;
  dtmf_code_t code;
  logic code_valid, block_done, tone_reject, zc_reject;
  logic [8:0] zc_count;
  energy_t energy [8];
  int checks = 0, failures = 0;
  int n_digits = 0, n_tone_rej = 0, n_zc_rej = 0, n_blocks = 0;
  int t_last, t_valid, n_zero_db;

  dtmf_detector dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // Records what the detector said during the last block.
  logic got_digit, got_zc_rej;
  dtmf_code_t got_code;
  always @(posedge clk) if (rst_n) begin
    if (code_valid) begin got_digit <= 1; got_code <= code; n_digits++; end
    if (zc_reject) begin got_zc_rej <= 1; n_zc_rej++; end
    if (tone_reject) n_tone_rej++;
    if (block_done) n_blocks++;
  end

  int n_global = 0;
  // Plays one block of a*sin(row) + b*sin(col) + hum + noise.
  task automatic play_block(input real fr, input real ar, input real fc, input real ac,
                            input real hum, input int noise, input real ph);
    real v, t;
    for (int n = 0; n < NB; n++) begin
      t = real'(n_global) / FS;
      v = ar * $sin(2.0 * PI * fr * t + ph) + ac * $sin(2.0 * PI * fc * t)
        + hum * $sin(2.0 * PI * 60.0 * t);
      if (noise > 0) v += real'($urandom_range(0, 2 * noise)) - real'(noise);
      x <= sample_t'($rtoi(v));
      x_valid <= 1;
      @(posedge clk);
      x_valid <= 0;
      if (n == NB - 1) t_last = int'($time / 10);
      n_global++;
      repeat (5) @(posedge clk);
    end
  endtask

  initial begin
    got_digit = 0; got_zc_rej = 0; got_code = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int k = 0; k < 16; k++) begin
      real ar, ac;
      ar = 2000.0 + 400.0 * real'(k % 5);
      ac = 3000.0 - 300.0 * real'(k % 4);
      play_block(ROWF[k/4], ar, COLF[k%4], ac, 0.0, 200, 0.3 * real'(k));
      got_digit = 0;
      play_block(ROWF[k/4], ar, COLF[k%4], ac, 0.0, 200, 0.3 * real'(k));
      repeat (2) @(posedge clk);
      t_valid = int'($time / 10);
      chk(got_digit, $sformatf("key %0d detected", k));
      chk(got_code == dtmf_code_t'(k), $sformatf("key %0d code %0d", k, got_code));
      chk(code == dtmf_code_t'(k), "code register holds key");
    end
    // silence, single tone and broadband noise: no digit
    got_digit = 0;
    play_block(697.0, 0.0, 1209.0, 0.0, 0.0, 0, 0.0);
    play_block(852.0, 4000.0, 1209.0, 0.0, 0.0, 100, 0.0);
    play_block(852.0, 0.0, 1209.0, 0.0, 0.0, 8000, 0.0);
    repeat (3) @(posedge clk);
    chk(!got_digit, "no digit from silence, one tone or noise");
    chk(code == dtmf_code_t'(15), "code register holds last key");
    // key 6 with uniform noise of the same power as the tone pair (0 dB SNR):
    // two tones of amplitude 3000 carry 9e6, noise uniform in +-5196 carries 9e6
    got_digit = 0;
    play_block(852.0, 0.0, 1209.0, 0.0, 0.0, 0, 0.0);
    for (int b = 0; b < 4; b++) play_block(770.0, 3000.0, 1477.0, 3000.0, 0.0, 5196, 0.0);
    repeat (3) @(posedge clk);
    chk(got_digit && code == dtmf_code_t'(6), "key 6 detected at 0 dB SNR");
    n_zero_db = n_digits;
    // a valid tone pair on a large hum: few zero crossings
    got_zc_rej = 0; got_digit = 0;
    play_block(770.0, 3000.0, 1336.0, 3000.0, 9000.0, 0, 0.0);
    play_block(770.0, 3000.0, 1336.0, 3000.0, 9000.0, 0, 0.0);
    repeat (3) @(posedge clk);
    chk(got_zc_rej, "zero-crossing rejection");
    chk(!got_digit, "no digit with hum");
    $display("blocks=%0d digits=%0d (of which at 0 dB SNR: %0d of 4) tone_reject=%0d zc_reject=%0d", n_blocks, n_digits, n_zero_db - 32, n_tone_rej, n_zc_rej);
    chk(n_blocks == 16 * 2 + 10, "one decision per block");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
