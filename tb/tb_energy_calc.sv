// Testbench of energy_calc: blocks of random filter outputs (small, large and
// saturating); the block energy is compared with a 64-bit reference sum of
// (y >>> 12)^2 clipped to 32 bits, and out_valid must pulse one clock after the last
// sample of each block.
module tb_energy_calc;
  import hearing_aid_pkg::*;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_first = 0, in_last = 0;
  acc_t y = '0;
  logic out_valid;
  energy_t energy;
  int checks = 0, failures = 0;

  energy_calc #(.SHIFT(12)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sum, t;
  int amp;
  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int blk = 0; blk < 6; blk++) begin
      amp = (blk < 2) ? 100000 : ((blk < 4) ? 50000000 : 2000000000);
      sum = 0;
      for (int n = 0; n < 30; n++) begin
        y <= acc_t'($urandom_range(0, 2 * amp) - amp);
        in_valid <= 1; in_first <= (n == 0); in_last <= (n == 29);
        @(posedge clk);
        in_valid <= 0; in_first <= 0; in_last <= 0;
        t = longint'(y) >>> 12;
        sum += t * t;
        if (sum > 64'hFFFF_FFFF) sum = 64'hFFFF_FFFF;
        #1;
        if (n == 29) begin
          checks++;
          if (!out_valid || energy != energy_t'(sum)) begin
            failures++;
            $display("blk %0d: energy=%0d exp=%0d valid=%b", blk, energy, sum, out_valid);
          end
        end else begin
          checks++;
          if (out_valid) begin failures++; $display("early out_valid"); end
        end
        repeat ($urandom_range(0, 2)) @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
