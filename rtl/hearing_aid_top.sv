// Hearing aid with frequency-response selection through the audio input.
//
// Each 16-bit audio sample goes to two blocks that run in parallel:
//   * the DTMF detector, which recognises a dual-tone (keypad) signal played into the
//     microphone by a hand-held device and holds the 4-bit code of the last key heard;
//   * the FIR filter, which applies the selected frequency-selective amplification
//     (one of four stored coefficient sets) and produces the audio output.
// The detector's code is the filter's response selection, so the user switches the
// response by sound alone: keys 1, 2, 3 and A select the all-pass, low-pass, high-pass
// and band-pass sets.
//
// Interface: one system clock; sample_valid is a one-clock pulse per sample of the
// audio converter (10 kHz), which must be at least N_TAPS+1 clocks apart. The filtered
// sample is valid in the fourth clock cycle after the input strobe; a DTMF decision
// comes three cycles after the last sample of each 250-sample block, and a new
// response takes effect from the next input sample. The converter and its serial interface
// are outside this module. Block structure and widths follow the design description;
// the single clock with sample strobes is this design's choice.
module hearing_aid_top
  import hearing_aid_pkg::*;
#(
  parameter int unsigned N_TAPS    = 513,
  parameter int unsigned OUT_SHIFT = 11,
  parameter int unsigned N_BLOCK   = 250
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample_valid,
  input  sample_t    audio_in,
  output sample_t    audio_out,
  output logic       audio_out_valid,
  output dtmf_code_t dtmf_code,
  output logic       dtmf_valid,
  output logic       dtmf_block_done,
  output logic       dtmf_tone_reject,
  output logic       dtmf_zc_reject,
  output logic [8:0] dtmf_zc_count,
  output energy_t    dtmf_energy [8],
  output response_t  response,
  output logic       busy
);

  dtmf_detector #(.N_BLOCK(N_BLOCK)) u_dtmf (
    .clk, .rst_n,
    .x_valid    (sample_valid),
    .x          (audio_in),
    .code       (dtmf_code),
    .code_valid (dtmf_valid),
    .block_done (dtmf_block_done),
    .tone_reject(dtmf_tone_reject),
    .zc_reject  (dtmf_zc_reject),
    .zc_count   (dtmf_zc_count),
    .energy     (dtmf_energy)
  );

  fir_filter #(.N(N_TAPS), .OUT_SHIFT(OUT_SHIFT)) u_fir (
    .clk, .rst_n,
    .sample_valid,
    .x_in     (audio_in),
    .ctrl     (dtmf_code),
    .y_out    (audio_out),
    .out_valid(audio_out_valid),
    .resp     (response),
    .busy
  );

endmodule
