// Testbench of goertzel_filter: random samples in blocks of 40; each output is compared
// with a 64-bit reference recursion, the one-clock latency and the state clear at block
// start are checked.
module tb_goertzel_filter;
  import hearing_aid_pkg::*;
  localparam int COEF = 21885;  // 1336 Hz
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  sample_t x = '0;
  logic out_valid, out_last;
  acc_t y;
  int checks = 0, failures = 0;

  goertzel_filter #(.COEF(COEF)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint r1, r2, r0, p;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (2) @(posedge clk);
    for (int blk = 0; blk < 5; blk++) begin
      r1 = 0; r2 = 0;
      for (int n = 0; n < 40; n++) begin
        x        <= sample_t'($urandom_range(0, 65535));
        in_valid <= 1; in_first <= (n == 0); in_last <= (n == 39);
        @(posedge clk);
        in_valid <= 0; in_first <= 0; in_last <= 0;
        // reference recursion
        p  = longint'(COEF) * r1;
        r0 = longint'(x) + (p >>> 14) - r2;
        r2 = r1; r1 = r0;
        #1;
        checks++;
        if (!out_valid || y != acc_t'(r0) || out_last != (n == 39)) begin
          failures++;
          $display("blk %0d n %0d: y=%0d exp=%0d valid=%b", blk, n, y, r0, out_valid);
        end
        repeat ($urandom_range(1, 3)) @(posedge clk);
        #1;
        checks++;
        if (out_valid) begin failures++; $display("out_valid stuck"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
