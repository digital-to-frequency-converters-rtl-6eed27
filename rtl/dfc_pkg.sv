// dfc_pkg: types and helper functions shared by the DTC-based pulse-output
// digital-to-frequency converter (DFC) and its testbenches.
//
// inl_shape_e selects the integral non-linearity profile applied by the
// behavioural fine-DTC model. inl_lsb() returns the INL, in DTC LSBs, of a
// fine DTC with nb bits for a given input word. The two shapes are the
// zero-mean profiles used to characterise the converter:
//   parabolic: INL(DW) = DW*(DW - 2^nb) * INLmax / (2^(nb-1))^2 + (2/3)*INLmax
//   cubic:     INL(DW) = DW*(DW - 2^(nb-1))*(DW - 2^nb) * INLmax
//                        / ( (3 - sqrt 5)/2 * (2^(nb-1))^3 )
// Nothing here is synthesized; the package only carries model constants.
package dfc_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  typedef enum logic [1:0] {
    INL_NONE      = 2'd0,
    INL_PARABOLIC = 2'd1,
    INL_CUBIC     = 2'd2
  } inl_shape_e;

  localparam real SQRT5 = 2.2360679774997896;

  function automatic real inl_lsb(inl_shape_e shape, real inl_max, int unsigned dw,
                                  int unsigned nb);
    real x, fs, half;
    x    = real'(dw);
    fs   = real'(64'd1 << nb);
    half = fs / 2.0;
    case (shape)
      INL_PARABOLIC: return x * (x - fs) * inl_max / (half * half) + (2.0 / 3.0) * inl_max;
      INL_CUBIC:     return x * (x - half) * (x - fs) * inl_max
                            / ((3.0 - SQRT5) / 2.0 * half * half * half);
      default:       return 0.0;
    endcase
  endfunction

endpackage
