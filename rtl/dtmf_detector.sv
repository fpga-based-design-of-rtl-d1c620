// Goertzel-filter based DTMF detector.
//
// The input samples are split into detection blocks of N_BLOCK samples (250 by
// default, 25 ms at 10 kHz). Every sample is fed to eight Goertzel resonators, one per
// DTMF frequency (rows 697, 770, 852, 941 Hz; columns 1209, 1336, 1477, 1633 Hz), each
// followed by a block energy calculation. At the end of each block the decision stage
// checks the energies and the zero-crossing count of the raw input and, when a valid
// digit is found, loads its 4-bit code {row, col} into the output register.
//
// Interface: x is sampled when x_valid is high (one pulse per audio sample); samples must
// be at least 4 clocks apart. code holds the last detected digit and code_valid pulses
// when it is written, 3 clocks after the last sample of a block. Eight filters with
// 250-sample energy calculation, the decision/zero-crossing stage and the output
// register follow the design description; block alignment (free-running from reset)
// is this design's choice.
module dtmf_detector
  import hearing_aid_pkg::*;
#(
  parameter int unsigned N_BLOCK   = 250,
  parameter int unsigned E_SHIFT   = 12,
  parameter energy_t     E_THRESH  = 32'd32768,
  parameter int unsigned REL_SHIFT = 3,
  parameter int unsigned ZC_MIN    = 25,
  parameter int unsigned ZC_MAX    = 110
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       x_valid,
  input  sample_t    x,
  output dtmf_code_t code,
  output logic       code_valid,
  output logic       block_done,    // pulses once per block, with the decision
  output logic       tone_reject,
  output logic       zc_reject,
  output logic [8:0] zc_count,      // zero crossings of the last complete block
  output energy_t    energy [8]
);

  localparam int unsigned CW = (N_BLOCK > 1) ? $clog2(N_BLOCK) : 1;

  logic [CW-1:0] cnt;
  logic          first, last;

  assign first = (cnt == '0);
  assign last  = (cnt == CW'(N_BLOCK - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       cnt <= '0;
    else if (x_valid) cnt <= last ? '0 : cnt + CW'(1);
  end

  logic [7:0] g_valid, g_last, e_valid;
  acc_t       g_y [8];

  for (genvar i = 0; i < 8; i++) begin : g_chan
    goertzel_filter #(.COEF(GOERTZEL_COEF[i])) u_goertzel (
      .clk, .rst_n,
      .in_valid (x_valid),
      .in_first (first),
      .in_last  (last),
      .x,
      .out_valid(g_valid[i]),
      .out_last (g_last[i]),
      .y        (g_y[i])
    );

    // The energy stage restarts on the first filter output of each block: that is the
    // output produced from the first input sample.
    logic first_d;
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)       first_d <= 1'b0;
      else if (x_valid) first_d <= first;
    end

    energy_calc #(.SHIFT(E_SHIFT)) u_energy (
      .clk, .rst_n,
      .in_valid (g_valid[i]),
      .in_first (first_d),
      .in_last  (g_last[i]),
      .y        (g_y[i]),
      .out_valid(e_valid[i]),
      .energy   (energy[i])
    );
  end

  dtmf_decision #(
    .E_THRESH (E_THRESH),
    .REL_SHIFT(REL_SHIFT),
    .ZC_MIN   (ZC_MIN),
    .ZC_MAX   (ZC_MAX)
  ) u_decision (
    .clk, .rst_n,
    .x_valid,
    .x_first    (first),
    .x_last     (last),
    .x,
    .e_valid    (e_valid[0]),
    .energy,
    .code,
    .code_valid,
    .tone_reject,
    .zc_reject,
    .zc_count
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) block_done <= 1'b0;
    else        block_done <= e_valid[0];
  end

endmodule
