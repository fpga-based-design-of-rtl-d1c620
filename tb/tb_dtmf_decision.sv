// Testbench of dtmf_decision: blocks of 60 samples with a chosen number of sign changes,
// followed by a set of eight energies. Random and hand-picked energy sets are judged by
// an independent model of the three rules (threshold, dominance within each group,
// zero-crossing range); the code register, code_valid and the reject pulses are
// compared one clock after e_valid.
module tb_dtmf_decision;
  import hearing_aid_pkg::*;
  localparam int NB = 60, ZMIN = 10, ZMAX = 40;
  localparam energy_t TH = 32'd32768;
  logic clk = 0, rst_n = 0;
  logic x_valid = 0, x_first = 0, x_last = 0, e_valid = 0;
  sample_t x = '0;
  energy_t energy [8];
  dtmf_code_t code;
  logic code_valid, tone_reject, zc_reject;
  logic [8:0] zc_count;
  int checks = 0, failures = 0;
  int n_valid = 0, n_tone_rej = 0, n_zc_rej = 0;

  dtmf_decision #(.E_THRESH(TH), .REL_SHIFT(3), .ZC_MIN(ZMIN), .ZC_MAX(ZMAX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  // One block whose samples change sign exactly zc times.
  task automatic send_block(input int zc);
    logic neg;
    neg = 1'b0;
    for (int n = 0; n < NB; n++) begin
      if (n > 0 && n <= zc) neg = ~neg;
      x <= neg ? -sample_t'($urandom_range(1, 3000)) : sample_t'($urandom_range(0, 3000));
      x_valid <= 1; x_first <= (n == 0); x_last <= (n == NB - 1);
      @(posedge clk);
      x_valid <= 0; x_first <= 0; x_last <= 0;
      @(posedge clk);
    end
  endtask

  // Reference judgement of one group: index of the maximum and whether it passes.
  function automatic logic group_ok(input energy_t g [4], output int imax);
    imax = 0;
    for (int i = 1; i < 4; i++) if (g[i] > g[imax]) imax = i;
    if (g[imax] < TH) return 0;
    for (int i = 0; i < 4; i++)
      if (i != imax && longint'(g[i]) * 8 > longint'(g[imax])) return 0;
    return 1;
  endfunction

  task automatic run_case(input energy_t e [8], input int zc);
    energy_t r [4], c [4];
    int ri, ci;
    logic eok, zok;
    dtmf_code_t code_before;
    for (int i = 0; i < 4; i++) begin r[i] = e[i]; c[i] = e[4+i]; end
    eok = group_ok(r, ri) & group_ok(c, ci);
    zok = (zc >= ZMIN) && (zc <= ZMAX);
    send_block(zc);
    code_before = code;
    for (int i = 0; i < 8; i++) energy[i] = e[i];
    e_valid <= 1;
    @(posedge clk);
    e_valid <= 0;
    #1;
    chk(zc_count == 9'(zc), "zc_count");
    chk(code_valid == (eok && zok), "code_valid");
    chk(tone_reject == !eok, "tone_reject");
    chk(zc_reject == (eok && !zok), "zc_reject");
    if (eok && zok) chk(code.row == 2'(ri) && code.col == 2'(ci), "code value");
    else            chk(code == code_before, "code held");
    n_valid += (eok && zok); n_tone_rej += !eok; n_zc_rej += (eok && !zok);
    @(posedge clk);
    #1;
    chk(!code_valid && !tone_reject && !zc_reject, "single pulse");
  endtask

  energy_t e [8];
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    #1 chk(code == '0, "reset code");
    e = '{100000, 1000, 2000, 500, 1000, 1000, 300000, 10};
    run_case(e, 20);                       // valid, row 0 col 2
    e = '{20000, 1000, 2000, 500, 1000, 1000, 30000, 10};
    run_case(e, 20);                       // below threshold
    e = '{100000, 20000, 2000, 500, 1000, 1000, 300000, 10};
    run_case(e, 20);                       // row not dominant
    e = '{100, 1000, 2000, 500000, 1000, 90000, 3000, 10};
    run_case(e, 5);                        // too few crossings
    run_case(e, 45);                       // too many crossings
    run_case(e, 30);                       // valid, row 3 col 1
    for (int t = 0; t < 40; t++) begin
      for (int i = 0; i < 8; i++) e[i] = $urandom_range(0, 3) == 0 ? $urandom_range(0, 2000000) : $urandom_range(0, 40000);
      run_case(e, $urandom_range(0, 50));
    end
    chk(n_valid > 0 && n_tone_rej > 0 && n_zc_rej > 0, "all outcomes seen");
    $display("valid=%0d tone_reject=%0d zc_reject=%0d", n_valid, n_tone_rej, n_zc_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
