// parallel_fft8: fully parallel 8-point radix-2 decimation-in-time FFT.
//
// All eight outputs are computed at once by three levels of radix-2
// butterflies. W8^2 (= -j) costs nothing: real and imaginary parts are swapped
// and one sign changed. W8^1 and W8^3 need one 1/sqrt2 constant multiplier
// each, after the sum/difference of the two parts. The butterflies work on
// words with GUARD extra fraction bits; every level halves its results, so no
// level can overflow, and the result y = DFT8(x)/8 is rounded to nearest once
// at the output. Inputs and outputs are registered: out_valid follows in_valid
// by 2 cycles and y holds its value until the next in_valid result. The
// parallel DIT structure and the operand-swap trick follow the document; the
// per-level halving, the guard bits, the Q15 constant 0x5A82 for 1/sqrt2 and
// the registers are this design's choices.
module parallel_fft8 #(
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] x_re [8],
  input  logic signed [DATA_W-1:0] x_im [8],
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] y_re [8],
  output logic signed [DATA_W-1:0] y_im [8]
);
  localparam int unsigned GUARD = 3;
  localparam int unsigned IW    = DATA_W + GUARD;     // internal word width
  typedef logic signed [DATA_W-1:0] io_t;
  typedef logic signed [IW-1:0]     word_t;
  typedef logic signed [IW:0]       wide_t;
  localparam logic signed [16:0] INV_SQRT2 = 17'sd23170;   // round(2^15/sqrt2)

  io_t   x_re_q [8], x_im_q [8];
  word_t a_re [8], a_im [8];
  logic  v_q;

  always_ff @(posedge clk) begin
    if (!rst_n) v_q <= 1'b0;
    else        v_q <= in_valid;
    if (in_valid) begin
      x_re_q <= x_re;
      x_im_q <= x_im;
    end
  end

  always_comb
    for (int n = 0; n < 8; n++) begin
      a_re[n] = word_t'(x_re_q[n]) <<< GUARD;
      a_im[n] = word_t'(x_im_q[n]) <<< GUARD;
    end

  // drop the guard bits, rounding to nearest
  function automatic io_t out_round(word_t v);
    wide_t r;
    r = wide_t'(v) + wide_t'(1 <<< (GUARD - 1));
    return io_t'(r >>> GUARD);
  endfunction

  // (p + q) / 2 and (p - q) / 2, rounded
  function automatic word_t half_sum(word_t p, word_t q);
    wide_t s;
    s = wide_t'(p) + wide_t'(q) + wide_t'(1);   // +1 for rounding
    return word_t'(s >>> 1);
  endfunction
  function automatic word_t half_dif(word_t p, word_t q);
    wide_t s;
    s = wide_t'(p) - wide_t'(q) + wide_t'(1);
    return word_t'(s >>> 1);
  endfunction
  // (p +/- q) / sqrt2, rounded
  function automatic word_t mul_r2(wide_t s);
    logic signed [IW+17:0] m;
    m = (IW+18)'(s) * (IW+18)'(INV_SQRT2) + (IW+18)'(1 <<< 14);
    return word_t'(m >>> 15);
  endfunction

  word_t b_re [8], b_im [8], c_re [8], c_im [8], d_re [8], d_im [8], t_re, t_im;
  localparam int BR [8] = '{0, 4, 2, 6, 1, 5, 3, 7};

  always_comb begin
    // level 1: pairs of bit-reversed inputs
    for (int m = 0; m < 4; m++) begin
      b_re[2*m]   = half_sum(a_re[BR[2*m]], a_re[BR[2*m+1]]);
      b_im[2*m]   = half_sum(a_im[BR[2*m]], a_im[BR[2*m+1]]);
      b_re[2*m+1] = half_dif(a_re[BR[2*m]], a_re[BR[2*m+1]]);
      b_im[2*m+1] = half_dif(a_im[BR[2*m]], a_im[BR[2*m+1]]);
    end
    // level 2: W4^0 and W4^1 = -j
    for (int g = 0; g < 8; g += 4) begin
      c_re[g]   = half_sum(b_re[g], b_re[g+2]);
      c_im[g]   = half_sum(b_im[g], b_im[g+2]);
      c_re[g+2] = half_dif(b_re[g], b_re[g+2]);
      c_im[g+2] = half_dif(b_im[g], b_im[g+2]);
      // b[g+3] * (-j) = (im, -re)
      c_re[g+1] = half_sum(b_re[g+1], b_im[g+3]);
      c_im[g+1] = half_dif(b_im[g+1], b_re[g+3]);
      c_re[g+3] = half_dif(b_re[g+1], b_im[g+3]);
      c_im[g+3] = half_sum(b_im[g+1], b_re[g+3]);
    end
    // level 3: W8^0..W8^3 on c[4..7]
    for (int j = 0; j < 4; j++) begin
      case (j)
        0: begin t_re = c_re[4]; t_im = c_im[4]; end
        1: begin                                      // (r + i, i - r)/sqrt2
          t_re = mul_r2(wide_t'(c_re[5]) + wide_t'(c_im[5]));
          t_im = mul_r2(wide_t'(c_im[5]) - wide_t'(c_re[5]));
        end
        2: begin t_re = c_im[6]; t_im = -c_re[6]; end  // -j: operand swap
        default: begin                                // (i - r, -(r + i))/sqrt2
          t_re = mul_r2(wide_t'(c_im[7]) - wide_t'(c_re[7]));
          t_im = mul_r2(-(wide_t'(c_re[7]) + wide_t'(c_im[7])));
        end
      endcase
      d_re[j]   = half_sum(c_re[j], t_re);
      d_im[j]   = half_sum(c_im[j], t_im);
      d_re[j+4] = half_dif(c_re[j], t_re);
      d_im[j+4] = half_dif(c_im[j], t_im);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= v_q;
    if (v_q)
      for (int k = 0; k < 8; k++) begin
        y_re[k] <= out_round(d_re[k]);
        y_im[k] <= out_round(d_im[k]);
      end
  end
endmodule
