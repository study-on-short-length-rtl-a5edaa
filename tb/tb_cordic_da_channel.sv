// tb_cordic_da_channel: serialises eight random complex words here (LSB
// first, guard = sign repeated), gives each CORDIC PE a random W8^r rotation
// with the matching 1/sqrt2 flag and a random residual twiddle index, runs the
// DA control sequence and compares the result with
// W64^nhat * sum_n W8^(r_n) x(n) / 8 in floating point (tolerance 3 LSB).
module tb_cordic_da_channel;
  import fft_pkg::*;
  localparam int DATA_W = 16, NB = DATA_W + 1, TOL = 3;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, lsb = 0, da_en = 0, da_first = 0, da_sign = 0;
  logic [7:0] b_re = 0, b_im = 0, scale = 0;
  pe_ctrl_t pe_ctrl [8];
  logic [2:0] nhat = 0;
  logic signed [DATA_W-1:0] y_re, y_im;
  int checks = 0, failures = 0, maxerr = 0;
  cordic_da_channel #(.DATA_W(DATA_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int xr [8], xi [8], r [8];
    logic [NB-1:0] wr [8], wi [8];
    foreach (pe_ctrl[n]) pe_ctrl[n] = PE_CTRL[0];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      real sr, si, a, er, ei, c, s;
      int dr, di, nh;
      nh   = int'($urandom_range(7));
      nhat = 3'(nh);
      sr = 0; si = 0;
      for (int n = 0; n < 8; n++) begin
        xr[n] = int'($urandom_range(46000)) - 23000;
        xi[n] = int'($urandom_range(46000)) - 23000;
        r[n]  = (t < 8) ? t : int'($urandom_range(7));
        wr[n] = NB'(xr[n]); wi[n] = NB'(xi[n]);
        pe_ctrl[n] = PE_CTRL[r[n]];
        scale[n]   = 1'(r[n] % 2);
        a  = -2.0 * PI * r[n] / 8.0;
        sr += xr[n] * $cos(a) - xi[n] * $sin(a);
        si += xr[n] * $sin(a) + xi[n] * $cos(a);
      end
      a = -2.0 * PI * nh / 64.0;
      c = $cos(a); s = $sin(a);
      er = (sr * c - si * s) / 8.0;
      ei = (sr * s + si * c) / 8.0;
      // bits j = 0..NB-1 at the PE inputs; DA sees each one cycle later
      for (int j = 0; j <= NB; j++) begin
        lsb = (j == 0);
        for (int n = 0; n < 8; n++) begin
          b_re[n] = (j < NB) ? wr[n][j] : 1'b0;
          b_im[n] = (j < NB) ? wi[n][j] : 1'b0;
        end
        da_en    = (j >= 1);
        da_first = (j == 1);
        da_sign  = (j == NB);
        @(negedge clk);
      end
      da_en = 0; da_sign = 0;
      dr = int'(y_re) - $rtoi(er + (er >= 0 ? 0.5 : -0.5));
      di = int'(y_im) - $rtoi(ei + (ei >= 0 ? 0.5 : -0.5));
      if (dr < 0) dr = -dr;
      if (di < 0) di = -di;
      if (dr > maxerr) maxerr = dr;
      if (di > maxerr) maxerr = di;
      checks++;
      if (dr > TOL || di > TOL) begin
        failures++;
        $display("got (%0d,%0d) exp (%f,%f)", y_re, y_im, er, ei);
      end
    end
    $display("max error %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
