// tb_parallel_fft8: random and extreme inputs through the parallel 8-point
// FFT; every output is compared with DFT8(x)/8 in floating point (tolerance
// 2 LSB) and out_valid must follow in_valid by exactly 2 cycles.
module tb_parallel_fft8;
  localparam int DATA_W = 16, TOL = 1;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic signed [DATA_W-1:0] x_re [8], x_im [8], y_re [8], y_im [8];
  int checks = 0, failures = 0, maxerr = 0;
  parallel_fft8 #(.DATA_W(DATA_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int xr [8], xi [8];
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      for (int n = 0; n < 8; n++) begin
        xr[n] = (t == 0) ? 23000 : (t == 1) ? ((n == 3) ? -30000 : 0) : int'($urandom_range(46000)) - 23000;
        xi[n] = (t == 0) ? -23000 : (t == 1) ? 0 : int'($urandom_range(46000)) - 23000;
        x_re[n] = DATA_W'(xr[n]); x_im[n] = DATA_W'(xi[n]);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      for (int n = 0; n < 8; n++) begin x_re[n] = '0; x_im[n] = '0; end
      checks++;
      if (out_valid) begin failures++; $display("out_valid after 1 cycle"); end
      @(negedge clk);
      checks++;
      if (!out_valid) begin failures++; $display("out_valid missing after 2 cycles"); end
      for (int k = 0; k < 8; k++) begin
        real er, ei, a;
        int dr, di;
        er = 0; ei = 0;
        for (int n = 0; n < 8; n++) begin
          a = -2.0 * PI * n * k / 8.0;
          er += xr[n] * $cos(a) - xi[n] * $sin(a);
          ei += xr[n] * $sin(a) + xi[n] * $cos(a);
        end
        er /= 8.0; ei /= 8.0;
        dr = int'(y_re[k]) - $rtoi(er + (er >= 0 ? 0.5 : -0.5));
        di = int'(y_im[k]) - $rtoi(ei + (ei >= 0 ? 0.5 : -0.5));
        if (dr < 0) dr = -dr;
        if (di < 0) di = -di;
        if (dr > maxerr) maxerr = dr;
        if (di > maxerr) maxerr = di;
        checks++;
        if (dr > TOL || di > TOL) begin
          failures++;
          $display("k=%0d got (%0d,%0d) exp (%f,%f)", k, y_re[k], y_im[k], er, ei);
        end
      end
      if (t % 2 == 1) @(negedge clk);
    end
    $display("max error %0d", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
