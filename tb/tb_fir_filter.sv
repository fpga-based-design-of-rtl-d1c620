// Testbench of fir_filter with N = 33 taps. Random samples (including full-scale runs
// that drive the output into saturation) are filtered while the DTMF control input
// walks through keys 1, 2, 9 (unused), 3 and A. The expected output is a direct-form
// convolution in which each past sample is weighted by the coefficient set that was
// selected when that sample arrived (what a transposed-form filter computes across a
// switch), scaled by 2^-11 and clipped to 16 bits. The output must appear exactly four
// clocks after the sample strobe.
module tb_fir_filter;
  import hearing_aid_pkg::*;
  localparam int N = 33;
  localparam int C = (N - 1) / 2;
  logic clk = 0, rst_n = 0, sample_valid = 0;
  sample_t x_in = '0;
  dtmf_code_t ctrl = '0;
  sample_t y_out;
  logic out_valid, busy;
  response_t resp;
  int checks = 0, failures = 0;
  int n_switch = 0, n_sat = 0, n_unused = 0;

  fir_filter #(.N(N), .OUT_SHIFT(11)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
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

  sample_t hist [N];
  int      hset [N];
  int      cur_set, lat;
  longint  acc, e;
  initial begin
    for (int k = 0; k < N; k++) begin hist[k] = '0; hset[k] = 0; end
    cur_set = 0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 300; n++) begin
      // control input from the detector
      case (n)
        50:  ctrl <= 4'b0001;   // key 2 -> LP
        100: ctrl <= 4'b1010;   // key 9 -> unused, LP stays
        150: ctrl <= 4'b0010;   // key 3 -> HP
        220: ctrl <= 4'b0011;   // key A -> BP
        default: ;
      endcase
      @(posedge clk);
      if (ctrl.row == 2'd0) begin
        if (int'(ctrl.col) != cur_set) n_switch++;
        cur_set = int'(ctrl.col);
      end else if (n == 100) n_unused++;
      for (int k = N - 1; k > 0; k--) begin hist[k] = hist[k-1]; hset[k] = hset[k-1]; end
      hist[0] = ((n % 60) >= 40 && (n % 60) < 50) ? 16'sd32767
              : sample_t'($urandom_range(0, 65535));
      hset[0] = cur_set;
      x_in <= hist[0];
      sample_valid <= 1;
      @(posedge clk);
      sample_valid <= 0;
      lat = 1;
      while (!out_valid && lat < 20) begin @(posedge clk); #1; lat++; end
      chk(lat == 4, $sformatf("latency %0d", lat));
      acc = 0;
      for (int k = 0; k < N; k++) acc += longint'(tap(hset[k], k)) * longint'(hist[k]);
      e = acc >>> 11;
      if (e > 32767) begin e = 32767; n_sat++; end
      if (e < -32768) begin e = -32768; n_sat++; end
      chk(longint'(y_out) == e, $sformatf("sample %0d y=%0d exp=%0d", n, y_out, e));
      chk(int'(resp) == cur_set, "selected response");
      repeat (N + $urandom_range(0, 5)) @(posedge clk);
    end
    $display("switches=%0d unused=%0d saturated=%0d", n_switch, n_unused, n_sat);
    chk(n_switch == 3 && n_unused == 1 && n_sat > 0, "mechanisms seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
