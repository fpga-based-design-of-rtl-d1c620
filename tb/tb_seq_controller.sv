// Testbench of seq_controller with N = 9: for each sample the processing enables must
// step mux_sel through 0..N-1 in N consecutive clocks, the load enables must follow one
// clock later with r_idx = mux_sel, busy must last N+1 clocks, and a strobe while busy
// must be ignored.
module tb_seq_controller;
  localparam int N = 9;
  localparam int KW = $clog2(N);
  logic clk = 0, rst_n = 0, sample_strobe = 0;
  logic start, p_en, r_en, busy;
  logic [KW-1:0] mux_sel, r_idx;
  int checks = 0, failures = 0;

  seq_controller #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s at %0t", msg, $time); end
  endtask

  int busy_cnt;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < 4; s++) begin
      sample_strobe <= 1;
      @(posedge clk);
      sample_strobe <= 0;
      busy_cnt = 0;
      for (int c = 0; c <= N; c++) begin
        #1;
        busy_cnt += busy;
        chk(p_en == (c < N), "p_en");
        if (c < N) chk(int'(mux_sel) == c, "mux_sel");
        chk(r_en == (c > 0), "r_en");
        if (c > 0) chk(int'(r_idx) == c - 1, "r_idx");
        @(posedge clk);
      end
      #1;
      chk(busy_cnt == N + 1, "busy length");
      chk(!busy && !p_en && !r_en, "idle after sequence");
      repeat (3 + s) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
