// ROM holding the sets of FIR filter coefficients, one set per noise-attenuation
// response (AP, LP, HP, BP), N coefficients of 12 bits each (4 x 513 by default).
//
// The read is combinational: coef = ROM[resp][addr]; the filter datapath registers it
// (register B). The ROM is an array initialised at start-up. In a fitted hearing aid
// each set is the product of the patient's loss-compensation response and one
// noise-attenuation response, computed off-line by frequency sampling; those values
// depend on an audiogram and are not part of this design. The built-in contents are
// generic linear-phase sets, symmetric about the centre tap C = (N-1)/2, in Q1.11
// (2048 = gain 1):
//   AP: h[C] = 2047                               (pure delay)
//   LP: h[C+d] = 409 for |d| <= 2                 (5-tap average, first null at fs/5 = 2 kHz)
//   HP: h[C] = 1950, h[C+d] = -97 for 1<=|d|<=10  (delta minus a 21-tap average,
//                                                  first null of the average at 476 Hz)
//   BP: LP convolved with HP, scaled by 1/2048:
//       h[C+d] = 409*[|d|<=2] - 19*overlap(d),  overlap(d) = 5 for |d|<=8,
//       13-|d| for 8<|d|<=12, 0 beyond
// Replace placeholder_coef (or the initial block) with fitted values to fit a user.
module coef_rom
  import hearing_aid_pkg::*;
#(
  parameter int unsigned N = 513
) (
  input  response_t            resp,
  input  logic [$clog2(N)-1:0] addr,
  output coef_t                coef
);

  localparam int C = (int'(N) - 1) / 2;

  function automatic coef_t placeholder_coef(input int unsigned set, input int k);
    int d, ad, ov, v;
    d  = k - C;
    ad = (d < 0) ? -d : d;
    ov = (ad <= 8) ? 5 : ((ad <= 12) ? 13 - ad : 0);
    case (set)
      0:       v = (ad == 0) ? 2047 : 0;
      1:       v = (ad <= 2) ? 409 : 0;
      2:       v = (ad == 0) ? 1950 : ((ad <= 10) ? -97 : 0);
      default: v = ((ad <= 2) ? 409 : 0) - 19 * ov;
    endcase
    return coef_t'(v);
  endfunction

  coef_t rom [N_RESPONSES*N];

  initial begin
    for (int s = 0; s < int'(N_RESPONSES); s++)
      for (int k = 0; k < int'(N); k++)
        rom[s*int'(N) + k] = placeholder_coef(s, k);
  end

  assign coef = rom[int'(resp) * int'(N) + int'(addr)];

endmodule
