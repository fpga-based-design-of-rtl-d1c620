// Goertzel filter: the second-order IIR resonator of one DTMF frequency.
//
// For every input sample it computes s[n] = x[n] + C*s[n-1] - s[n-2], with
// C = 2*cos(2*pi*f/fs) given as a Q2.14 parameter, and presents s[n] as its output.
// The resonator has its poles on the unit circle, so its state is cleared at the start
// of each detection block: a sample flagged in_first is processed as if s[n-1] and
// s[n-2] were zero. A tone at the tuned frequency makes s grow linearly over the block,
// other tones keep it bounded; the energy stage that follows measures that difference.
//
// Interface: in_valid qualifies x, in_first/in_last mark the first and last sample of a
// block. The result appears one clock after in_valid with out_valid, and in_last is
// forwarded as out_last. Widths: 16-bit input, 32-bit state/output (a and b of the
// detector figure). The recursion and the per-block restart follow the Goertzel
// algorithm the design names; the fixed-point format is this design's choice.
module goertzel_filter
  import hearing_aid_pkg::*;
#(
  parameter int COEF = 29676  // round(2^14 * 2cos(2*pi*697/10000))
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    in_valid,
  input  logic    in_first,
  input  logic    in_last,
  input  sample_t x,
  output logic    out_valid,
  output logic    out_last,
  output acc_t    y
);

  acc_t s1, s2;                         // s[n-1], s[n-2]
  acc_t s1_eff, s2_eff, s_new;
  logic signed [ACC_W+17:0] prod;       // C * s[n-1], before the Q2.14 shift

  always_comb begin
    s1_eff = in_first ? '0 : s1;
    s2_eff = in_first ? '0 : s2;
    prod   = (ACC_W+18)'(signed'(COEF)) * (ACC_W+18)'(s1_eff);
    s_new  = acc_t'(ACC_W'(x)) + acc_t'(prod >>> GOERTZEL_FRAC) - s2_eff;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1        <= '0;
      s2        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid & in_last;
      if (in_valid) begin
        s2 <= s1_eff;
        s1 <= s_new;
        y  <= s_new;
      end
    end
  end

endmodule
