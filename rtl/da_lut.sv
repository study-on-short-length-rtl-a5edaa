// da_lut: integrated look-up table of the distributed-arithmetic (DA) stage.
//
// For one bit position the DA stage needs the weighted sum of the eight CORDIC
// output bits: bits of 45-degree channels count 1/sqrt2, the others 1. With a =
// number of ones and b = number of ones in scaled channels that sum is
// (a-b) + b/sqrt2. The table also merges the residual twiddle factor
// W64^nhat (nhat = 0..7), so it returns two words,
//   lut_a = ((a-b) + b/sqrt2) * cos(2*pi*nhat/64)
//   lut_b = ((a-b) + b/sqrt2) * sin(2*pi*nhat/64)
// unsigned with LUT_FRAC fraction bits. As in the document the table is split
// into a 64-word part addressed by {a[2:0], b[2:0]} and a 2-word part for the
// special cases a = b = 0 and a = b = 8; the 64-word part holds a = 8, b = 0 at
// address (0,0) and a = 8, b = 4 at (0,4), which no legal a < 8 uses. Contents
// are computed at elaboration from the constants in fft_pkg. Combinational.
module da_lut
  import fft_pkg::*;
#(
  parameter int unsigned LUT_W    = 16,
  parameter int unsigned LUT_FRAC = LUT_W - 4
) (
  input  logic [3:0]       a,
  input  logic [3:0]       b,
  input  logic [2:0]       nhat,
  output logic [LUT_W-1:0] lut_a,
  output logic [LUT_W-1:0] lut_b
);
  typedef logic [2*LUT_W-1:0] word_t;   // {cos word, sin word}

  function automatic word_t entry(int aa, int bb, logic [2:0] nh);
    return {LUT_W'(lut_value(aa, bb, nh, 1'b0, LUT_FRAC)),
            LUT_W'(lut_value(aa, bb, nh, 1'b1, LUT_FRAC))};
  endfunction

  function automatic word_t [511:0] build_main();
    word_t [511:0] t;
    for (int nh = 0; nh < 8; nh++)
      for (int aa = 0; aa < 8; aa++)
        for (int bb = 0; bb < 8; bb++)
          t[nh*64 + aa*8 + bb] = (aa == 0) ? entry(8, bb, 3'(nh)) : entry(aa, bb, 3'(nh));
    return t;
  endfunction

  function automatic word_t [15:0] build_special();
    word_t [15:0] t;
    for (int nh = 0; nh < 8; nh++) begin
      t[nh*2]     = entry(0, 0, 3'(nh));
      t[nh*2 + 1] = entry(8, 8, 3'(nh));
    end
    return t;
  endfunction

  localparam word_t [511:0] MAIN    = build_main();
  localparam word_t [15:0]  SPECIAL = build_special();

  word_t w;
  always_comb begin
    if (a == 4'd0 || (a == 4'd8 && b == 4'd8))
      w = SPECIAL[{nhat, a[3]}];
    else
      w = MAIN[{nhat, a[2:0], b[2:0]}];
    lut_a = w[2*LUT_W-1:LUT_W];
    lut_b = w[LUT_W-1:0];
  end
endmodule
