// Testbench of coef_rom at the full 513 taps: every coefficient of the four sets is
// compared with the documented tap values, and the DC gain and symmetry of each set
// are checked.
module tb_coef_rom;
  import hearing_aid_pkg::*;
  localparam int N = 513;
  localparam int C = 256;
  response_t resp;
  logic [9:0] addr;
  coef_t coef;
  int checks = 0, failures = 0;

  coef_rom #(.N(N)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected taps, written out per set as the list of non-zero taps.
  function automatic int expected(input int s, input int k);
    int d;
    d = (k > C) ? k - C : C - k;
    if (s == 0) return (d == 0) ? 2047 : 0;
    if (s == 1) return (d < 3) ? 409 : 0;
    if (s == 2) begin
      if (d == 0) return 1950;
      return (d < 11) ? -97 : 0;
    end
    // BP: 409 - 5*19 = 314 for d<=2, -95 for 3..8, then -19*(13-d) for 9..12
    if (d <= 2) return 314;
    if (d <= 8) return -95;
    if (d <= 12) return -19 * (13 - d);
    return 0;
  endfunction

  int sum, mirror;
  coef_t h [N];
  initial begin
    for (int s = 0; s < 4; s++) begin
      sum = 0;
      for (int k = 0; k < N; k++) begin
        resp = response_t'(s); addr = 10'(k);
        #1;
        h[k] = coef;
        sum += int'(coef);
        checks++;
        if (int'(coef) != expected(s, k)) begin
          failures++;
          $display("set %0d k %0d: %0d exp %0d", s, k, coef, expected(s, k));
        end
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if (h[k] != h[N-1-k]) begin failures++; $display("set %0d not symmetric at %0d", s, k); end
      end
      checks++;
      case (s)
        0: mirror = 2047;
        1: mirror = 2045;
        2: mirror = 10;
        default: mirror = 2045 - 19 * 105;
      endcase
      if (sum != mirror) begin failures++; $display("set %0d dc gain %0d exp %0d", s, sum, mirror); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
