// Testbench of fir_mac_datapath with N = 16 taps and random coefficients: the testbench
// plays the controller (processing cycle k, then load of register k one clock later)
// and compares register 0 after every sample with a direct-form convolution of the
// input history, wrapped to 32 bits.
module tb_fir_mac_datapath;
  import hearing_aid_pkg::*;
  localparam int N = 16;
  localparam int KW = $clog2(N);
  logic clk = 0, rst_n = 0;
  sample_t x = '0;
  coef_t coef;
  logic p_en = 0, r_en = 0, y_valid;
  logic [KW-1:0] mux_sel = '0, r_idx = '0;
  acc_t y;
  int checks = 0, failures = 0;

  fir_mac_datapath #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  coef_t h [N];
  assign coef = h[mux_sel];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  sample_t hist [N];
  int acc;
  initial begin
    for (int k = 0; k < N; k++) h[k] = coef_t'($urandom_range(0, 4095));
    for (int k = 0; k < N; k++) hist[k] = '0;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int n = 0; n < 60; n++) begin
      for (int k = N - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = (n % 17 == 3) ? sample_t'(16'h8000) : sample_t'($urandom_range(0, 65535));
      x <= hist[0];
      for (int k = 0; k <= N; k++) begin
        p_en <= (k < N); mux_sel <= KW'(k < N ? k : 0);
        r_en <= (k > 0); r_idx <= KW'(k > 0 ? k - 1 : 0);
        @(posedge clk);
      end
      p_en <= 0; r_en <= 0;
      @(posedge clk);
      acc = 0;
      for (int k = 0; k < N; k++) acc += int'(h[k]) * int'(hist[k]);
      #1;
      checks++;
      if (y != acc_t'(acc)) begin
        failures++;
        $display("sample %0d: y=%0d exp=%0d", n, y, acc);
      end
      repeat ($urandom_range(0, 3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
