// cbrm_pkg: constants and constant functions shared by the CBRM Hough engine.
//
// The rotation coefficients alpha = cos(dtheta) and beta = sin(dtheta) are
// carried as signed fixed-point integers with COEF_FRAC fractional bits. They
// only ever reach the hardware through the Convolution-LUT contents, which are
// computed at elaboration by lut_entry(): the partial product
//   (+-alpha) * a + (+-beta) * b
// for one k-bit block a of the "self" operand and b of the "cross" operand,
// rounded (half up) to LF fractional bits. Signs select the table column, as in
// the sign-split convolution table of the architecture; the coefficient
// precision (COEF_FRAC) and the rounding rule are this design's choices.
package cbrm_pkg;

  localparam int COEF_FRAC = 30;
  localparam real PI = 3.14159265358979323846;

  // alpha = cos(pi/n_theta) as a COEF_FRAC fixed-point integer.
  function automatic longint alpha_q(input int n_theta);
    return longint'($floor($cos(PI / n_theta) * (2.0 ** COEF_FRAC) + 0.5));
  endfunction

  // beta = sin(pi/n_theta) as a COEF_FRAC fixed-point integer.
  function automatic longint beta_q(input int n_theta);
    return longint'($floor($sin(PI / n_theta) * (2.0 ** COEF_FRAC) + 0.5));
  endfunction

  // One Convolution-LUT word: (s_self ? -c_self : c_self) * a
  //                         + (s_cross ? -c_cross : c_cross) * b,
  // rounded half up from COEF_FRAC to lf fractional bits.
  function automatic longint lut_entry(input longint c_self, input longint c_cross,
                                       input bit s_self, input bit s_cross,
                                       input longint a, input longint b, input int lf);
    longint v;
    v = (s_self ? -c_self : c_self) * a + (s_cross ? -c_cross : c_cross) * b;
    return (v + (longint'(1) <<< (COEF_FRAC - lf - 1))) >>> (COEF_FRAC - lf);
  endfunction

endpackage
