// Shared types and constants of the DTMF-controlled hearing aid.
//
// The audio path carries 16-bit signed samples at a 10 kHz sampling rate. Internal
// accumulators (Goertzel states, energies, FIR partial sums) are 32 bits wide, the DTMF
// code is 4 bits ({row, column}), and filter coefficients are 12-bit signed numbers.
// These widths and the 697..1633 Hz DTMF frequency grid follow the design description;
// the Q-formats, the Goertzel coefficient scaling and the key-to-response mapping are
// this design's own choices and are documented next to each constant.
package hearing_aid_pkg;

  // Data widths: a = sample, b = accumulator, c = DTMF code, coefficient width.
  localparam int unsigned SAMPLE_W = 16;
  localparam int unsigned ACC_W    = 32;
  localparam int unsigned CODE_W   = 4;
  localparam int unsigned COEF_W   = 12;

  typedef logic signed [SAMPLE_W-1:0] sample_t;
  typedef logic signed [ACC_W-1:0]    acc_t;
  typedef logic signed [COEF_W-1:0]   coef_t;
  typedef logic        [ACC_W-1:0]    energy_t;

  // DTMF code as produced by the detector: 2-bit row index (697, 770, 852, 941 Hz)
  // and 2-bit column index (1209, 1336, 1477, 1633 Hz).
  typedef struct packed {
    logic [1:0] row;
    logic [1:0] col;
  } dtmf_code_t;

  // Noise-attenuation responses held in the coefficient ROM.
  typedef enum logic [1:0] {
    RESP_AP = 2'd0,  // all pass
    RESP_LP = 2'd1,  // low pass, tilt above 2 kHz
    RESP_HP = 2'd2,  // high pass, tilt below 500 Hz
    RESP_BP = 2'd3   // cascade of LP and HP
  } response_t;

  localparam int unsigned N_RESPONSES = 4;

  // Four of the sixteen DTMF codes select a response: the keys of the first row
  // (697 Hz) with columns 0..3, i.e. keys '1', '2', '3' and 'A', select AP, LP, HP
  // and BP. The other twelve codes leave the current response unchanged.
  function automatic logic code_selects_response(input dtmf_code_t code);
    return code.row == 2'd0;
  endfunction

  function automatic response_t code_to_response(input dtmf_code_t code);
    return response_t'(code.col);
  endfunction

  // Goertzel resonator coefficients 2*cos(2*pi*f/fs) for fs = 10 kHz in Q2.14:
  // round(2^14 * 2 * cos(2*pi*f/10000)). Index 0..3 rows, 4..7 columns.
  localparam int unsigned GOERTZEL_FRAC = 14;
  localparam int DTMF_FREQ_HZ [8] = '{697, 770, 852, 941, 1209, 1336, 1477, 1633};
  localparam int GOERTZEL_COEF [8] = '{29676, 29007, 28184, 27205, 23760, 21885, 19642, 16981};

endpackage
