// Frequency-selective amplification filter: a linear-phase FIR filter of N taps
// (513 by default) realised with one multiplier and one adder used N times per sample.
//
// It joins the sequence controller, the coefficient ROM and the multiply-accumulate
// datapath. When sample_valid marks a new input sample, the sample is held in the input
// register and the response selection is updated from the DTMF code: codes of the
// first keypad row (keys 1, 2, 3, A) select the AP, LP, HP and BP coefficient sets;
// other codes keep the current set. The set therefore changes only between samples.
// The controller then runs the N processing cycles. The 32-bit output y(n) is scaled
// by 2^-OUT_SHIFT (Q1.11 coefficients: OUT_SHIFT = 11 gives unity gain for a
// coefficient of 2048) and saturated to 16 bits.
//
// Timing: out_valid is high, with y_out, in the fourth clock cycle after the one in
// which sample_valid is high; the filter is busy for
// N+1 clocks per sample, so the system clock must be at least (N+1) times the sampling
// rate (5.14 MHz for 513 taps at 10 kHz). The architecture follows the design
// description; the code-to-response mapping, the output scaling and saturation are this
// design's choices.
module fir_filter
  import hearing_aid_pkg::*;
#(
  parameter int unsigned N         = 513,
  parameter int unsigned OUT_SHIFT = 11
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_valid,
  input  sample_t    x_in,
  input  dtmf_code_t ctrl,
  output sample_t    y_out,
  output logic       out_valid,
  output response_t  resp,
  output logic       busy
);

  localparam int unsigned KW = $clog2(N);

  logic          start, p_en, r_en, y_valid;
  logic [KW-1:0] mux_sel, r_idx;
  sample_t       x_hold;
  coef_t         coef;
  acc_t          y_acc;

  seq_controller #(.N(N)) u_seq (
    .clk, .rst_n,
    .sample_strobe(sample_valid),
    .start, .p_en, .mux_sel, .r_en, .r_idx, .busy
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_hold <= '0;
      resp   <= RESP_AP;
    end else if (start) begin
      x_hold <= x_in;
      if (code_selects_response(ctrl)) resp <= code_to_response(ctrl);
    end
  end

  coef_rom #(.N(N)) u_rom (
    .resp, .addr(mux_sel), .coef
  );

  fir_mac_datapath #(.N(N)) u_dp (
    .clk, .rst_n,
    .x(x_hold), .coef, .p_en, .mux_sel, .r_en, .r_idx,
    .y(y_acc), .y_valid
  );

  localparam acc_t OUT_MAX = acc_t'(2**(SAMPLE_W-1) - 1);
  localparam acc_t OUT_MIN = -acc_t'(2**(SAMPLE_W-1));

  acc_t y_scaled;
  assign y_scaled = y_acc >>> OUT_SHIFT;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_out     <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= y_valid;
      if (y_valid) begin
        if (y_scaled > OUT_MAX)      y_out <= sample_t'(OUT_MAX);
        else if (y_scaled < OUT_MIN) y_out <= sample_t'(OUT_MIN);
        else                         y_out <= sample_t'(y_scaled);
      end
    end
  end

endmodule
