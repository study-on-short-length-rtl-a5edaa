// cordic_pe: bit-serial CORDIC processing element for the rotations W8^r.
//
// One complex word (xr, xi) arrives LSB first, one bit of each part per clock.
// The PE forms the rotation by W8^r without its 1/sqrt2 scale factor, i.e.
//   yr = (+/-xr) + (+/-xi),   yi = (+/-xr) + (+/-xi)
// with each term enabled or disabled and signed by an 8-bit control word.
// Four bit-serial two's complementors make the signs, AND gates remove the
// disabled terms and two bit-serial adders add the pairs. The control-word
// encoding is the document's table (see fft_pkg::PE_CTRL for the bit meaning).
// Inputs must be sign-extended by one guard bit so the sums cannot overflow;
// outputs are combinational bit streams (registered by the caller).
module cordic_pe
  import fft_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  logic     lsb,
  input  pe_ctrl_t ctrl,
  input  logic     xr,
  input  logic     xi,
  output logic     yr,
  output logic     yi
);
  logic t_rr, t_ri, t_ir, t_ii;   // xr->re, xi->re, xr->im, xi->im after sign

  bs_complementor u_c_rr (.clk, .rst_n, .lsb, .neg(ctrl[0]),  .d(xr), .q(t_rr));
  bs_complementor u_c_ri (.clk, .rst_n, .lsb, .neg(~ctrl[1]), .d(xi), .q(t_ri));
  bs_complementor u_c_ir (.clk, .rst_n, .lsb, .neg(~ctrl[4]), .d(xr), .q(t_ir));
  bs_complementor u_c_ii (.clk, .rst_n, .lsb, .neg(ctrl[5]),  .d(xi), .q(t_ii));

  bs_adder u_add_re (.clk, .rst_n, .lsb, .c0(1'b0),
                     .a(t_rr & ctrl[2]), .b(t_ri & ctrl[3]), .s(yr));
  bs_adder u_add_im (.clk, .rst_n, .lsb, .c0(1'b0),
                     .a(t_ir & ctrl[6]), .b(t_ii & ctrl[7]), .s(yi));
endmodule
