// End-to-end testbench of hearing_aid_top at its default size (513-tap filter,
// 250-sample detection blocks). Samples are 520 clocks apart. The audio input plays, in
// 250-sample blocks: noise, then the DTMF keys 2, 9, 3, A and 1 for two blocks each
// (over low-level noise), then a key on a strong 60 Hz hum. Checked throughout:
//   * every audio output against a 513-tap direct-form convolution in which each past
//     sample is weighted by the coefficient set in force when it arrived, scaled by
//     2^-11 and clipped to 16 bits, four clocks after its sample strobe;
//   * each detected code against the key being played;
//   * the response selection: keys 2, 3, A, 1 switch to LP, HP, BP, AP, key 9 leaves
//     it alone.
// Each mechanism (digit detection, response switch, unused code ignored, energy
// rejection, zero-crossing rejection) is counted and must occur at least once.
module tb_hearing_aid_top;
  import hearing_aid_pkg::*;
  localparam int N = 513;
  localparam int C = (N - 1) / 2;
  localparam int NB = 250;
  localparam int PERIOD = 520;
  localparam real FS = 10000.0;
  localparam real PI = 3.14159265358979;
  localparam real ROWF [4] = '{697.0, 770.0, 852.0, 941.0};
  localparam real COLF [4] = '{1209.0, 1336.0, 1477.0, 1633.0};

  logic clk = 0, rst_n = 0, sample_valid = 0;
  sample_t audio_in = '0;
  sample_t audio_out;
  logic audio_out_valid, dtmf_valid, dtmf_block_done, dtmf_tone_reject, dtmf_zc_reject, busy;
  dtmf_code_t dtmf_code;
  logic [8:0] dtmf_zc_count;
  energy_t dtmf_energy [8];
  response_t response;

  int checks = 0, failures = 0;
  int n_digit = 0, n_switch = 0, n_unused = 0, n_tone_rej = 0, n_zc_rej = 0, n_out = 0;

  hearing_aid_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3250 * PERIOD + 20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  function automatic int tap(input int s, input int k);
    int d;
    d = (k > C) ? k - C : C - k;
    case (s)
      0: return (d == 0) ? 2047 : 0;
      1: return (d < 3) ? 409 : 0;
      2: return (d == 0) ? 1950 : ((d < 11) ? -97 : 0);
      default: begin
        if (d <= 2) return 314;
        if (d <= 8) return -95;
        if (d <= 12) return -19 * (13 - d);
        return 0;
      end
    endcase
  endfunction

  // Detector events.
  int playing_key;            // key whose tones are on the input, -1 for none
  int model_set;              // coefficient set the filter should use next
  always @(posedge clk) if (rst_n) begin
    if (dtmf_valid) begin
      n_digit++;
      chk(playing_key >= 0 && dtmf_code == dtmf_code_t'(playing_key),
          $sformatf("detected code %0d while playing %0d", dtmf_code, playing_key));
      if (dtmf_code.row == 2'd0) begin
        if (int'(dtmf_code.col) != model_set) n_switch++;
        model_set = int'(dtmf_code.col);
      end else begin
        n_unused++;
      end
    end
    if (dtmf_tone_reject) n_tone_rej++;
    if (dtmf_zc_reject)   n_zc_rej++;
  end

  sample_t hist [N];
  int      hset [N];
  int      n_global = 0, lat;
  longint  acc, e;

  task automatic play_block(input int key, input real amp, input real hum, input int noise);
    real v, t;
    playing_key = key;
    for (int n = 0; n < NB; n++) begin
      t = real'(n_global) / FS;
      v = hum * $sin(2.0 * PI * 60.0 * t);
      if (key >= 0)
        v += amp * ($sin(2.0 * PI * ROWF[key/4] * t) + $sin(2.0 * PI * COLF[key%4] * t + 0.7));
      if (noise > 0) v += real'($urandom_range(0, 2 * noise)) - real'(noise);
      for (int k = N - 1; k > 0; k--) begin hist[k] = hist[k-1]; hset[k] = hset[k-1]; end
      hist[0] = sample_t'($rtoi(v));
      hset[0] = model_set;
      audio_in <= hist[0];
      sample_valid <= 1;
      @(posedge clk);
      sample_valid <= 0;
      #1;
      lat = 1;
      while (!audio_out_valid && lat < 20) begin @(posedge clk); #1; lat++; end
      chk(lat == 4, $sformatf("output latency %0d", lat));
      acc = 0;
      for (int k = 0; k < N; k++) acc += longint'(tap(hset[k], k)) * longint'(hist[k]);
      e = acc >>> 11;
      if (e > 32767) e = 32767;
      if (e < -32768) e = -32768;
      chk(longint'(audio_out) == e, $sformatf("sample %0d out=%0d exp=%0d", n_global, audio_out, e));
      chk(int'(response) == hset[0], "response in force");
      n_out++;
      n_global++;
      repeat (PERIOD - lat - 1) @(posedge clk);
    end
  endtask

  // keys: index = row*4 + col; '1'=0, '2'=1, '3'=2, 'A'=3, '8'=9, '9'=10
  initial begin
    for (int k = 0; k < N; k++) begin hist[k] = '0; hset[k] = 0; end
    model_set = 0; playing_key = -1;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    play_block(-1, 0.0, 0.0, 3000);        // noise only
    play_block(1, 3000.0, 0.0, 300);       // key 2 -> LP
    play_block(1, 3000.0, 0.0, 300);
    chk(response == RESP_LP, "key 2 selects LP");
    play_block(10, 3000.0, 0.0, 300);      // key 9 -> ignored
    play_block(10, 3000.0, 0.0, 300);
    chk(response == RESP_LP, "key 9 keeps LP");
    play_block(2, 2500.0, 0.0, 300);       // key 3 -> HP
    play_block(2, 2500.0, 0.0, 300);
    chk(response == RESP_HP, "key 3 selects HP");
    play_block(3, 2500.0, 0.0, 300);       // key A -> BP
    play_block(3, 2500.0, 0.0, 300);
    chk(response == RESP_BP, "key A selects BP");
    play_block(0, 3000.0, 0.0, 300);       // key 1 -> AP
    play_block(0, 3000.0, 0.0, 300);
    chk(response == RESP_AP, "key 1 selects AP");
    play_block(9, 3000.0, 9000.0, 0);      // key 8 on hum -> zero-crossing reject
    play_block(9, 3000.0, 9000.0, 0);
    playing_key = -1;
    repeat (10) @(posedge clk);
    $display("outputs=%0d digits=%0d switches=%0d unused=%0d tone_reject=%0d zc_reject=%0d",
             n_out, n_digit, n_switch, n_unused, n_tone_rej, n_zc_rej);
    chk(n_digit > 0, "digit detection happened");
    chk(n_switch >= 4, "response switches happened");
    chk(n_unused > 0, "unused code ignored");
    chk(n_tone_rej > 0, "energy rejection happened");
    chk(n_zc_rej > 0, "zero-crossing rejection happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
