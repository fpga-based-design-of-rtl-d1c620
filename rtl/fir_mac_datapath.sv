// Datapath of the FIR filter with sequential multiply-accumulate operations.
//
// The filter is computed in transposed form, one tap per processing cycle, with a single
// multiplier and a single adder:
//   register k  <=  x(n) * h(k) + register k+1      for k = 0 .. N-2
//   register N-1 <= x(n) * h(N-1) + 0
// In processing cycle k (p_en, mux_sel = k) register B takes the coefficient h(k) from
// the ROM, sign-extended to 16 bits, and register C takes the output of multiplexer
// MUX_R, which selects register k+1, or zero for k = N-1. In the next clock (r_en,
// r_idx = k) the product x(n)*B plus C is written into register k. Because k runs
// upward, register k+1 is read before it is overwritten, so it still holds the partial
// sum of the previous sample. Register 0 then holds the output y(n).
//
// Interface: x is the current sample, held for the whole sequence; coef is the ROM
// output for address mux_sel. y is register 0 (32 bits) and y_valid pulses the clock
// after it is written. Widths follow the architecture figure: 16-bit sample and
// multiplier inputs, 12-bit coefficients, 32-bit products, sums and registers. The sum
// wraps at 32 bits. Register reset to zero is this design's choice.
module fir_mac_datapath
  import hearing_aid_pkg::*;
#(
  parameter int unsigned N = 513
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  sample_t              x,
  input  coef_t                coef,
  input  logic                 p_en,
  input  logic [$clog2(N)-1:0] mux_sel,
  input  logic                 r_en,
  input  logic [$clog2(N)-1:0] r_idx,
  output acc_t                 y,
  output logic                 y_valid
);

  localparam int unsigned KW = $clog2(N);

  sample_t reg_b;          // coefficient register
  acc_t    reg_c;          // selected partial sum
  logic [N-1:0][ACC_W-1:0] regs;  // Reg 0 .. Reg N-1
  acc_t    mux_r, product, sum;

  // MUX_R: register k+1, or zero for the last tap.
  always_comb begin
    mux_r = '0;
    if (mux_sel < KW'(N - 1)) mux_r = acc_t'(regs[mux_sel + KW'(1)]);
  end

  assign product = acc_t'(reg_b) * acc_t'(x);
  assign sum     = product + reg_c;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reg_b <= '0;
      reg_c <= '0;
    end else if (p_en) begin
      reg_b <= sample_t'(coef);
      reg_c <= mux_r;
    end
  end

  // Reg 0 .. Reg N-1; register k is loaded when r_en is high with r_idx = k (the load
  // clock Clk_R(k)).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    regs        <= '0;
    else if (r_en) regs[r_idx] <= sum;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) y_valid <= 1'b0;
    else        y_valid <= r_en && (r_idx == '0);
  end

  assign y = acc_t'(regs[0]);

endmodule
