// DTMF decision logic, zero-crossing detector and output register.
//
// At the end of every detection block it receives the eight block energies (four row
// and four column Goertzel channels) and decides whether the block held a DTMF digit:
//   * the strongest row channel and the strongest column channel must each reach
//     E_THRESH;
//   * each must dominate the other three channels of its group by 2^REL_SHIFT
//     (a channel's energy shifted left by REL_SHIFT must not exceed the maximum);
//   * the number of zero crossings of the input over the same block must lie in
//     [ZC_MIN, ZC_MAX], the range expected for a pair of tones between 697 and 1633 Hz.
// A digit that passes is written to the output register (the 4-bit code {row, col})
// and code_valid pulses for one clock; otherwise the register keeps its last code.
// The register resets to 0 (key '1').
//
// Interface: x_valid/x_first/x_last/x carry the input samples and their block
// boundaries (for the zero-crossing count), e_valid strobes the eight energies. The
// decision is registered one clock after e_valid. The design names this stage
// "decision logic and zero crossing detection" without giving its rules: the three
// tests above, their thresholds and the hold-last-code behaviour are this design's
// choices.
module dtmf_decision
  import hearing_aid_pkg::*;
#(
  parameter energy_t     E_THRESH  = 32'd32768,
  parameter int unsigned REL_SHIFT = 3,
  parameter int unsigned ZC_MIN    = 25,
  parameter int unsigned ZC_MAX    = 110
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x_valid,
  input  logic       x_first,
  input  logic       x_last,
  input  sample_t    x,
  input  logic       e_valid,
  input  energy_t    energy [8],
  output dtmf_code_t code,
  output logic       code_valid,
  output logic       tone_reject,   // pulses when a block failed the energy tests
  output logic       zc_reject,     // pulses when only the zero-crossing test failed
  output logic [8:0] zc_count       // zero crossings of the last complete block
);

  // ---------------- zero-crossing detector ----------------
  logic       prev_neg;
  logic [8:0] zc_run;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prev_neg <= 1'b0;
      zc_run   <= '0;
      zc_count <= '0;
    end else if (x_valid) begin
      prev_neg <= x[SAMPLE_W-1];
      if (x_first) begin
        zc_run <= '0;
      end else if ((x[SAMPLE_W-1] != prev_neg) && (zc_run != '1)) begin
        zc_run <= zc_run + 9'd1;
      end
      if (x_last) begin
        zc_count <= zc_run +
          9'((!x_first && (x[SAMPLE_W-1] != prev_neg) && (zc_run != '1)) ? 1 : 0);
      end
    end
  end

  // ---------------- decision logic ----------------
  // Index of the largest energy in a group of four (lowest index wins a tie).
  function automatic logic [1:0] argmax4(input energy_t e0, e1, e2, e3);
    logic [1:0] i01, i23;
    energy_t    m01, m23;
    i01 = (e1 > e0) ? 2'd1 : 2'd0;
    m01 = (e1 > e0) ? e1 : e0;
    i23 = (e3 > e2) ? 2'd3 : 2'd2;
    m23 = (e3 > e2) ? e3 : e2;
    return (m23 > m01) ? i23 : i01;
  endfunction

  localparam int unsigned EW = ACC_W + REL_SHIFT;

  energy_t    rows [4];
  energy_t    cols [4];
  logic [1:0] r_i, c_i;
  logic       energy_ok, zc_ok;

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      rows[i] = energy[i];
      cols[i] = energy[4+i];
    end
    r_i = argmax4(rows[0], rows[1], rows[2], rows[3]);
    c_i = argmax4(cols[0], cols[1], cols[2], cols[3]);
    // Every other channel of a group, times 2^REL_SHIFT, must stay at or below the
    // group's maximum.
    energy_ok = (rows[r_i] >= E_THRESH) && (cols[c_i] >= E_THRESH);
    for (int i = 0; i < 4; i++) begin
      if ((2'(i) != r_i) && ((EW'(rows[i]) << REL_SHIFT) > EW'(rows[r_i]))) energy_ok = 1'b0;
      if ((2'(i) != c_i) && ((EW'(cols[i]) << REL_SHIFT) > EW'(cols[c_i]))) energy_ok = 1'b0;
    end
    zc_ok = (zc_count >= 9'(ZC_MIN)) && (zc_count <= 9'(ZC_MAX));
  end

  // Output register ("Reg out"), loaded only by a detected digit.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      code        <= '0;
      code_valid  <= 1'b0;
      tone_reject <= 1'b0;
      zc_reject   <= 1'b0;
    end else begin
      code_valid  <= e_valid & energy_ok & zc_ok;
      tone_reject <= e_valid & ~energy_ok;
      zc_reject   <= e_valid & energy_ok & ~zc_ok;
      if (e_valid && energy_ok && zc_ok) begin
        code.row <= r_i;
        code.col <= c_i;
      end
    end
  end

endmodule
