// cordic_da_fft8: refined 8-point CORDIC-DA branch FFT with merged twiddles.
//
// For one group n1 of a radix-8 64-point FFT it computes
//   y(k2) = W64^(n1*k2) * sum_{n=0..7} x(n) * W8^(n*k2) / 8,   k2 = 0..7
// (n1 = 0 gives the plain 8-point DFT). On start the eight complex input words
// are loaded into the shared parallel-to-serial converter, which streams them
// LSB first to CHANNELS identical datapaths. Each datapath (cordic_da_channel)
// rotates the bit streams with bit-serial CORDIC PEs and sums them with
// distributed arithmetic, so one pass of DATA_W+4 cycles yields CHANNELS
// outputs, and 8/CHANNELS passes yield all eight. The circular P/S register
// is reused by every pass without a reload.
// Interface: start (ignored while busy) with n1 and x_re/x_im; y_valid pulses
// in the last cycle of each pass, DATA_W+4 cycles after start counting the
// start cycle, with y_k2[c] naming the output each channel carries. A new start
// is taken in the cycle after the last y_valid. Structure (shared P/S
// converter, CORDIC stage, DA stage, duplicated channels) follows the
// document; the /8 scaling and the pass schedule are this design's.
module cordic_da_fft8
  import fft_pkg::*;
#(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned LUT_W    = 16,
  parameter int unsigned ACC_W    = 23
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [2:0]               n1,
  input  logic signed [DATA_W-1:0] x_re [8],
  input  logic signed [DATA_W-1:0] x_im [8],
  output logic                     busy,
  output logic                     y_valid,
  output logic [2:0]               y_k2 [CHANNELS],
  output logic signed [DATA_W-1:0] y_re [CHANNELS],
  output logic signed [DATA_W-1:0] y_im [CHANNELS]
);
  initial begin
    assert (CHANNELS == 1 || CHANNELS == 2 || CHANNELS == 4 || CHANNELS == 8)
      else $error("CHANNELS must divide 8");
  end

  logic ps_load, ps_shift, ps_guard, lsb, da_en, da_first, da_sign;
  pe_ctrl_t   pe_ctrl [CHANNELS][8];
  logic [7:0] scale   [CHANNELS];
  logic [2:0] nhat    [CHANNELS];
  logic [7:0] b_re, b_im;

  cordic_da_ctrl #(.DATA_W(DATA_W), .CHANNELS(CHANNELS)) u_ctrl (
    .clk, .rst_n, .start, .n1, .busy, .ps_load, .ps_shift, .ps_guard, .lsb,
    .da_en, .da_first, .da_sign, .y_valid, .pe_ctrl, .scale, .nhat, .k2(y_k2));

  ps_converter #(.DATA_W(DATA_W)) u_ps (
    .clk, .load(ps_load), .shift(ps_shift), .guard(ps_guard),
    .d_re(x_re), .d_im(x_im), .b_re, .b_im);

  for (genvar c = 0; c < CHANNELS; c++) begin : g_ch
    cordic_da_channel #(.DATA_W(DATA_W), .LUT_W(LUT_W), .ACC_W(ACC_W)) u_ch (
      .clk, .rst_n, .lsb, .b_re, .b_im, .pe_ctrl(pe_ctrl[c]), .scale(scale[c]),
      .nhat(nhat[c]), .da_en, .da_first, .da_sign, .y_re(y_re[c]), .y_im(y_im[c]));
  end
endmodule
