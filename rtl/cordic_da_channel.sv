// cordic_da_channel: one complete CORDIC-DA datapath ("channel").
//
// It turns the eight bit-serial input words of the shared P/S converter into
// one output of the 8-point DFT with a merged twiddle factor:
//   y = W64^nhat * sum_n K_n * M_n * x(n)  / 8
// where M_n is the unscaled W8^r_n rotation done by CORDIC PE n (control word
// pe_ctrl[n]) and K_n = 1/sqrt2 for channels flagged in scale, else 1.
//   CORDIC stage : eight bit-serial PEs, then one pipeline register per bit.
//   DA stage     : per bit column, ones counters give a (all ones) and b (ones
//                  of scaled channels) for the real and the imaginary bits;
//                  two integrated LUTs give {cos, sin} products; the real
//                  accumulator adds LUT_A(re)+LUT_B(im), the imaginary one
//                  LUT_A(im)-LUT_B(re) (multiplication by cos - j sin).
// Timing (set by the controller): bit j enters the PEs in one cycle and is
// accumulated the next; after the sign (guard) column y_re/y_im, formed
// combinationally from the accumulators by round-to-nearest and saturation,
// are valid until the next pass starts accumulating.
// The CORDIC/DA split, ones counters, four LUT products and 3-operand
// accumulators follow the document; the /8 output scaling is this design's.
module cordic_da_channel
  import fft_pkg::*;
#(
  parameter int unsigned DATA_W = 16,
  parameter int unsigned LUT_W  = 16,
  parameter int unsigned ACC_W  = 23
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     lsb,        // bit 0 is at the PE inputs
  input  logic [7:0]               b_re,       // serial bits, one per input word
  input  logic [7:0]               b_im,
  input  pe_ctrl_t                 pe_ctrl [8],
  input  logic [7:0]               scale,      // 1/sqrt2 flag per input word
  input  logic [2:0]               nhat,       // residual twiddle index
  input  logic                     da_en,      // a bit column is in the pipeline register
  input  logic                     da_first,   // ... and it is bit 0
  input  logic                     da_sign,    // ... and it is the sign bit
  output logic signed [DATA_W-1:0] y_re,
  output logic signed [DATA_W-1:0] y_im
);
  localparam int unsigned SH = ACC_W - DATA_W - 3;   // accumulator -> result/8

  logic [7:0] r_bits, i_bits;     // CORDIC outputs (combinational)
  logic [7:0] r_q, i_q;           // pipeline register

  for (genvar n = 0; n < 8; n++) begin : g_pe
    cordic_pe u_pe (.clk, .rst_n, .lsb, .ctrl(pe_ctrl[n]),
                    .xr(b_re[n]), .xi(b_im[n]), .yr(r_bits[n]), .yi(i_bits[n]));
  end

  always_ff @(posedge clk) begin
    r_q <= r_bits;
    i_q <= i_bits;
  end

  logic [3:0] a_r, b_r, a_i, b_i;
  ones_counter u_cnt_ar (.d(r_q),         .cnt(a_r));
  ones_counter u_cnt_br (.d(r_q & scale), .cnt(b_r));
  ones_counter u_cnt_ai (.d(i_q),         .cnt(a_i));
  ones_counter u_cnt_bi (.d(i_q & scale), .cnt(b_i));

  logic [LUT_W-1:0] la_r, lb_r, la_i, lb_i;
  da_lut #(.LUT_W(LUT_W)) u_lut_r (.a(a_r), .b(b_r), .nhat, .lut_a(la_r), .lut_b(lb_r));
  da_lut #(.LUT_W(LUT_W)) u_lut_i (.a(a_i), .b(b_i), .nhat, .lut_a(la_i), .lut_b(lb_i));

  logic signed [ACC_W-1:0] acc_re, acc_im;
  da_accumulator #(.LUT_W(LUT_W), .ACC_W(ACC_W)) u_acc_re (
    .clk, .rst_n, .en(da_en), .first(da_first), .sign(da_sign), .sub_b(1'b0),
    .op_a(la_r), .op_b(lb_i), .acc(acc_re));
  da_accumulator #(.LUT_W(LUT_W), .ACC_W(ACC_W)) u_acc_im (
    .clk, .rst_n, .en(da_en), .first(da_first), .sign(da_sign), .sub_b(1'b1),
    .op_a(la_i), .op_b(lb_r), .acc(acc_im));

  // round to nearest, then saturate to DATA_W bits
  function automatic logic signed [DATA_W-1:0] rnd_sat(logic signed [ACC_W-1:0] v);
    logic signed [ACC_W:0] r;
    r = (ACC_W+1)'(v) + ((ACC_W+1)'(1) <<< (SH - 1));
    r = r >>> SH;
    if (r > (ACC_W+1)'(2**(DATA_W-1) - 1))  return {1'b0, {(DATA_W-1){1'b1}}};
    if (r < -(ACC_W+1)'(2**(DATA_W-1)))     return {1'b1, {(DATA_W-1){1'b0}}};
    return r[DATA_W-1:0];
  endfunction

  always_comb begin
    y_re = rnd_sat(acc_re);
    y_im = rnd_sat(acc_im);
  end
endmodule
