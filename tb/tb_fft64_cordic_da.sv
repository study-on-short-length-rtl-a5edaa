// tb_fft64_cordic_da: end-to-end test of the 64-point CORDIC-DA FFT processor
// at its default parameters.
//
// Streams frames of 64 complex samples, one per tick: an impulse, a constant,
// a single tone, then random frames; the stream is first continuous, then has
// a gap of idle ticks inside a frame, then stops so the pipeline must flush.
// Every output is compared with the floating-point DFT X(k)/64 of its frame
// (tolerance 2 LSB per part), every frame must deliver all 64 indices once,
// the latency from a frame's first sample to its first result must stay within
// one tick of the same value and below the 1002 cycles reported for the
// document's chip, and frames must leave 64 ticks apart. The test also counts how often
// each mechanism of the design happens: both input banks used, both matrix
// buffer orientations read, runs with only the first stage, with both stages
// and with only the second stage (flush), second passes of the branch FFT and
// an input gap. One that never happens is a failure. A watchdog ends a hung run.
// For the random frames it also reports the peak signal-to-noise ratio used to
// grade the document's chip, PSNR = 20*log10(2^16 / MSE) with MSE the mean
// squared complex error of a frame in LSB^2, and requires each frame to reach
// the 98.77 dB minimum reported there for the CORDIC-DA chip.
module tb_fft64_cordic_da;
  localparam int DATA_W = 16;
  localparam int NFRAMES = 10;
  localparam int TOL = 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, tick, in_valid = 0, out_valid;
  logic signed [DATA_W-1:0] in_re = 0, in_im = 0, out_re, out_im;
  logic [5:0] out_index;

  fft64_cordic_da dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, maxerr = 0;
  int xr [NFRAMES][64], xi [NFRAMES][64];
  real sse [NFRAMES];
  localparam real PSNR_MIN = 98.77;
  longint seen [NFRAMES];
  int in_frame = 0, in_pos = 0, out_frame = 0, out_cnt = 0;
  longint cyc = 0, first_in [NFRAMES], first_out [NFRAMES];

  // mechanism counters
  int n_bank [2], n_swap [2], n_s1_only = 0, n_both = 0, n_s2_only = 0;
  int n_pass2 = 0, n_q_reload = 0, n_gap = 0;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc++;
    if (rst_n) begin
      if (dut.in_we && dut.widx == 0) n_bank[dut.wbank]++;
      if (dut.mb_rd_en && dut.scyc == 0 && dut.slot == 0) n_swap[dut.s2_swap]++;
      if (dut.run_start) begin
        if (dut.full[dut.rbank] && !dut.mb_pending) n_s1_only++;
        if (dut.full[dut.rbank] &&  dut.mb_pending) n_both++;
        if (!dut.full[dut.rbank] && dut.mb_pending) n_s2_only++;
      end
      if (dut.s1_valid && dut.u_s1.u_ctrl.pass != 0) n_pass2++;
      if (dut.s2_valid && dut.oq_cnt == 1 && tick) n_q_reload++;
    end
  end

  function automatic void ref_dft(int f, int k, output real rr, output real ri);
    real a;
    rr = 0; ri = 0;
    for (int n = 0; n < 64; n++) begin
      a  = -2.0 * PI * n * k / 64.0;
      rr += xr[f][n] * $cos(a) - xi[f][n] * $sin(a);
      ri += xr[f][n] * $sin(a) + xi[f][n] * $cos(a);
    end
    rr /= 64.0; ri /= 64.0;
  endfunction

  // output checker
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      real rr, ri; int er, ei;
      if (out_cnt == 0) begin first_out[out_frame] = cyc; sse[out_frame] = 0; end
      ref_dft(out_frame, int'(out_index), rr, ri);
      begin
        int gr, gi;
        real dr, di;
        gr = int'(out_re); gi = int'(out_im);
        dr = gr - rr; di = gi - ri;
        sse[out_frame] += dr * dr + di * di;
      end
      er = int'(out_re) - $rtoi(rr + (rr >= 0 ? 0.5 : -0.5));
      ei = int'(out_im) - $rtoi(ri + (ri >= 0 ? 0.5 : -0.5));
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (er > TOL || ei > TOL) begin
        failures++;
        if (failures < 20)
          $display("frame %0d k=%0d got (%0d,%0d) exp (%0.2f,%0.2f)", out_frame, out_index, out_re, out_im, rr, ri);
      end
      seen[out_frame] |= longint'(1) << out_index;
      out_cnt++;
      if (out_cnt == 64) begin
        checks++;
        if (seen[out_frame] != '1) begin
          failures++;
          $display("frame %0d index coverage %h", out_frame, seen[out_frame]);
        end
        out_cnt = 0;
        out_frame++;
      end
    end
  end

  initial begin
    for (int f = 0; f < NFRAMES; f++) begin
      seen[f] = 0;
      for (int n = 0; n < 64; n++) begin
        case (f)
          0: begin xr[f][n] = (n == 0) ? 20000 : 0; xi[f][n] = 0; end
          1: begin xr[f][n] = 16000; xi[f][n] = -8000; end
          2: begin
            xr[f][n] = $rtoi(20000.0 * $cos(2.0 * PI * 5 * n / 64.0));
            xi[f][n] = $rtoi(20000.0 * $sin(2.0 * PI * 5 * n / 64.0));
          end
          default: begin
            xr[f][n] = int'($urandom_range(46000)) - 23000;
            xi[f][n] = int'($urandom_range(46000)) - 23000;
          end
        endcase
      end
    end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    // The source holds each sample for a whole tick period and moves on after
    // the clock edge that ends a tick cycle (stimulus changes on negedge).
    while (in_frame < NFRAMES) begin
      // idle ticks inside frame 7 (after 20 samples): input gap
      if (in_frame == 7 && in_pos == 20 && n_gap < 30) begin
        in_valid = 0;
        n_gap++;
      end else begin
        in_valid = 1;
        in_re    = DATA_W'(xr[in_frame][in_pos]);
        in_im    = DATA_W'(xi[in_frame][in_pos]);
      end
      do @(negedge clk); while (!tick);
      if (in_valid && in_pos == 0) first_in[in_frame] = cyc;
      @(negedge clk);
      if (in_valid) begin
        in_pos++;
        if (in_pos == 64) begin in_pos = 0; in_frame++; end
      end
    end
    in_valid = 0;
    wait (out_frame == NFRAMES);
    repeat (20) @(posedge clk);

    // latency: the same, within one tick period, for frames 0..5 (frame 6
    // waits for frame 7, which had the input gap); and no more than the
    // 10020 ns = 1002 cycles at 100 MHz the document reports for its chip
    for (int f = 0; f < 6; f++) begin
      longint d;
      d = (first_out[f] - first_in[f]) - (first_out[1] - first_in[1]);
      checks++;
      if (d > longint'(dut.DIV) || d < -longint'(dut.DIV) || first_out[f] - first_in[f] > 1002) begin
        failures++;
        $display("frame %0d latency %0d", f, first_out[f] - first_in[f]);
      end
    end
    // throughput: consecutive frames come out one frame period (64 ticks) apart
    checks++;
    if (first_out[3] - first_out[2] != 64 * dut.DIV) begin
      failures++;
      $display("output frame period %0d cycles", first_out[3] - first_out[2]);
    end
    $display("latency %0d cycles (first sample in -> first result out), max error %0d LSB",
             first_out[0] - first_in[0], maxerr);
    $display("banks %0d/%0d swaps %0d/%0d runs s1-only %0d both %0d s2-only %0d pass2 %0d qreload %0d gap %0d",
             n_bank[0], n_bank[1], n_swap[0], n_swap[1], n_s1_only, n_both, n_s2_only, n_pass2, n_q_reload, n_gap);
    begin
      real p, pmin, pmax, psum;
      pmin = 1.0e9; pmax = 0; psum = 0;
      for (int f = 3; f < NFRAMES; f++) begin
        p = 20.0 * $log10(65536.0 / (sse[f] / 64.0));
        psum += p;
        if (p < pmin) pmin = p;
        if (p > pmax) pmax = p;
        checks++;
        if (p < PSNR_MIN) begin failures++; $display("frame %0d PSNR %0.2f dB", f, p); end
      end
      $display("PSNR of random frames: avg %0.2f dB, min %0.2f dB, max %0.2f dB",
               psum / (NFRAMES - 3), pmin, pmax);
    end
    foreach (n_bank[i]) begin checks++; if (n_bank[i] == 0) begin failures++; $display("bank %0d never used", i); end end
    foreach (n_swap[i]) begin checks++; if (n_swap[i] == 0) begin failures++; $display("swap %0d never read", i); end end
    checks++; if (n_s1_only == 0)  begin failures++; $display("no first-stage-only run"); end
    checks++; if (n_both == 0)     begin failures++; $display("no two-stage run"); end
    checks++; if (n_s2_only == 0)  begin failures++; $display("no flush run"); end
    checks++; if (n_pass2 == 0)    begin failures++; $display("no second pass"); end
    checks++; if (n_gap == 0)      begin failures++; $display("no input gap"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
