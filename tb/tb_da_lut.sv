// tb_da_lut: for every residual twiddle index and every (a, b) pair that the
// three scale patterns can produce (no scaled channel, four alternate scaled
// channels, all eight scaled), compares both table words with
// ((a-b) + b/sqrt2) * cos/sin(2*pi*nhat/64) * 2^12 computed in floating point.
module tb_da_lut;
  localparam int LUT_W = 16, FRAC = 12;
  localparam real PI = 3.14159265358979323846;
  logic [3:0] a, b;
  logic [2:0] nhat;
  logic [LUT_W-1:0] lut_a, lut_b;
  int checks = 0, failures = 0;
  da_lut #(.LUT_W(LUT_W)) dut (.*);
  function automatic real rabs(real v); return (v < 0) ? -v : v; endfunction
  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int n = 0; n < 8; n++)
      for (int aa = 0; aa <= 8; aa++)
        for (int bb = 0; bb <= aa; bb++) begin
          real v, ea, eb;
          if (!(bb == 0 || bb == aa || (bb <= 4 && aa - bb <= 4))) continue;
          a = 4'(aa); b = 4'(bb); nhat = 3'(n);
          #1;
          v  = (aa - bb) + bb / $sqrt(2.0);
          ea = v * $cos(2.0 * PI * n / 64.0) * (1 << FRAC);
          eb = v * $sin(2.0 * PI * n / 64.0) * (1 << FRAC);
          checks++;
          if (rabs(real'(lut_a) - ea) > 0.51 || rabs(real'(lut_b) - eb) > 0.51) begin
            failures++;
            $display("nhat=%0d a=%0d b=%0d: got %0d,%0d exp %f,%f", n, aa, bb, lut_a, lut_b, ea, eb);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
