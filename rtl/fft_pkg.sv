// fft_pkg: constants and helper functions shared by the CORDIC-DA 64-point FFT.
//
// It holds
//   * the CORDIC PE control words of the eight W8^r rotations (the 8-bit words
//     follow the document's control-signal table bit for bit),
//   * the cosine and sine of the eight residual twiddle angles 2*pi*n/64,
//     n = 0..7, and 1/sqrt(2), all in Q1.20 (value * 2^20, rounded),
//   * lut_value(), which computes one word of the integrated DA look-up table
//     at elaboration time from those constants.
// The Q1.20 format and the way the table is computed are this design's own.
package fft_pkg;

  // Bit meaning of a CORDIC PE control word (decoded from the rotation table):
  //   [0] negate xr into re   [1] xi into re positive   [2] xr into re   [3] xi into re
  //   [4] xr into im positive [5] negate xi into im     [6] xr into im   [7] xi into im
  typedef logic [7:0] pe_ctrl_t;

  localparam pe_ctrl_t PE_CTRL [8] = '{
    8'b1000_0100,   // W8^0 : ctrl[0:7] = 0 0 1 0 0 0 0 1
    8'b1100_1110,   // W8^1 : 0 1 1 1 0 0 1 1
    8'b0100_1010,   // W8^2 : 0 1 0 1 0 0 1 0
    8'b1110_1111,   // W8^3 : 1 1 1 1 0 1 1 1
    8'b1010_0101,   // W8^4 : 1 0 1 0 0 1 0 1
    8'b1111_1101,   // W8^5 : 1 0 1 1 1 1 1 1
    8'b0101_1000,   // W8^6 : 0 0 0 1 1 0 1 0
    8'b1101_1100    // W8^7 : 0 0 1 1 1 0 1 1
  };

  localparam int unsigned Q = 20;
  localparam longint COS_Q [8] = '{1048576, 1043527, 1028428, 1003425,
                                   968758,  924761,  871859,  810560};
  localparam longint SIN_Q [8] = '{0,       102778,  204567,  304386,
                                   401273,  494295,  582558,  665210};
  localparam longint INV_SQRT2_Q = 741455;

  // Value ((a-b) + b/sqrt2) * trig, rounded to 'frac' fraction bits.
  // trig_sel = 0 uses the cosine of 2*pi*nhat/64, 1 the sine.
  function automatic longint lut_value(int a, int b, logic [2:0] nhat, bit trig_sel, int frac);
    longint col, prod, t;
    if (a < b) return 0;
    col  = (longint'(a) - longint'(b)) * (longint'(1) << Q) + longint'(b) * INV_SQRT2_Q;  // Q.20
    t    = trig_sel ? SIN_Q[nhat] : COS_Q[nhat];
    prod = col * t;                                                         // Q.40
    return (prod + (longint'(1) << (2*Q - frac - 1))) >>> (2*Q - frac);
  endfunction

  // Round-to-nearest arithmetic right shift followed by saturation to w bits.
  function automatic longint round_sat(longint v, int sh, int w);
    longint r, hi, lo;
    r  = (sh > 0) ? ((v + (longint'(1) << (sh - 1))) >>> sh) : v;
    hi = (longint'(1) << (w - 1)) - 1;
    lo = -(longint'(1) << (w - 1));
    if (r > hi) return hi;
    if (r < lo) return lo;
    return r;
  endfunction

endpackage
