// tb_cordic_da_fft8: self-checking test of the CORDIC-DA branch FFT.
//
// Drives random groups of eight complex words with random n1 and compares
// every output with W64^(n1*k2) * DFT8(x)(k2) / 8 computed here in floating
// point. Allowed error: 4 LSB per part (LUT rounding and the bits the DA
// accumulator drops). Also checks that the first results come DATA_W+4 cycles
// after start and that all eight k2 are produced once per group. A watchdog
// ends the run with a failure if it hangs.
module tb_cordic_da_fft8;
  localparam int DATA_W = 16, CHANNELS = 4, NPASS = 8 / CHANNELS;
  localparam real PI = 3.14159265358979323846;
  localparam int TOL = 4;

  logic clk = 0, rst_n = 0, start = 0, busy, y_valid;
  logic [2:0] n1;
  logic signed [DATA_W-1:0] x_re [8], x_im [8];
  logic [2:0] y_k2 [CHANNELS];
  logic signed [DATA_W-1:0] y_re [CHANNELS], y_im [CHANNELS];
  int checks = 0, failures = 0, maxerr = 0;

  cordic_da_fft8 #(.DATA_W(DATA_W), .CHANNELS(CHANNELS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void ref_out(int k2, int g1, output real rr, output real ri);
    real sr = 0, si = 0, a, c, s;
    for (int n = 0; n < 8; n++) begin
      a  = -2.0 * PI * n * k2 / 8.0;
      sr += x_re[n] * $cos(a) - x_im[n] * $sin(a);
      si += x_re[n] * $sin(a) + x_im[n] * $cos(a);
    end
    a  = -2.0 * PI * g1 * k2 / 64.0;
    c  = $cos(a); s = $sin(a);
    rr = (sr * c - si * s) / 8.0;
    ri = (sr * s + si * c) / 8.0;
  endfunction

  task automatic check(int k2, int gr, int gi);
    real rr, ri; int er, ei;
    ref_out(k2, int'(n1), rr, ri);
    er = gr - $rtoi(rr + (rr >= 0 ? 0.5 : -0.5));
    ei = gi - $rtoi(ri + (ri >= 0 ? 0.5 : -0.5));
    if (er < 0) er = -er;
    if (ei < 0) ei = -ei;
    if (er > maxerr) maxerr = er;
    if (ei > maxerr) maxerr = ei;
    checks++;
    if (er > TOL || ei > TOL) begin
      failures++;
      $display("MISMATCH n1=%0d k2=%0d got (%0d,%0d) exp (%f,%f)", n1, k2, gr, gi, rr, ri);
    end else if ($test$plusargs("show_all"))
      $display("n1=%0d k2=%0d got (%0d,%0d) exp (%f,%f)", n1, k2, gr, gi, rr, ri);
  endtask

  initial begin
    int seen, cyc0, lat;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int g = 0; g < 60; g++) begin
      for (int n = 0; n < 8; n++) begin
        case (g)
          0: begin x_re[n] = 16'sd23000; x_im[n] = -16'sd23000; end     // extreme values
          1: begin x_re[n] = (n == 0) ? 16'sd1000 : 16'sd0; x_im[n] = 0; end
          2: begin x_re[n] = -16'sd23170; x_im[n] = -16'sd23170; end
          default: begin
            x_re[n] = DATA_W'($signed($urandom_range(46000)) - 23000);
            x_im[n] = DATA_W'($signed($urandom_range(46000)) - 23000);
          end
        endcase
      end
      n1 = (g < 8) ? 3'(g) : 3'($urandom_range(7));
      start <= 1;
      @(posedge clk);
      cyc0 = 0;
      start <= 0;
      seen = 0;
      lat  = 1;
      for (int p = 0; p < NPASS; p++) begin
        do begin @(posedge clk); lat++; end while (!y_valid);
        // y_valid is sampled one cycle late here: count check on first pass only
        if (p == 0) begin
          checks++;
          if (lat != DATA_W + 4) begin
            failures++;
            $display("latency %0d, expected %0d", lat, DATA_W + 4);
          end
        end
        for (int c = 0; c < CHANNELS; c++) begin
          check(y_k2[c], y_re[c], y_im[c]);
          seen |= 1 << y_k2[c];
        end
      end
      checks++;
      if (seen != 8'hff) begin failures++; $display("k2 coverage %b", seen); end
      @(posedge clk);
    end
    $display("max error %0d LSB", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
