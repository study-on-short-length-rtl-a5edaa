// fft64_stream_check: drives one fft64_cordic_da instance with a continuous
// stream of random frames and checks every result, for use by testbenches
// that run the processor with a non-default channel count.
//
// It owns its clock, reset and the processor. NFRAMES frames of 64 random
// complex samples go in back to back, one per tick; after the last frame the
// input stops and the last frame is flushed. Each output is compared with the
// floating-point X(k)/64 of its frame (tolerance TOL LSB), each frame must
// deliver all 64 indices, and consecutive frames must leave one frame period
// (64 ticks = 64*DIV cycles) apart. done rises when all frames are checked;
// checks and failures are then final. The tick period is the processor's own
// (8/CHANNELS)*(DATA_W+4)/8 cycles.
module fft64_stream_check #(
  parameter int CHANNELS = 2,
  parameter int NFRAMES  = 4,
  parameter int TOL      = 2
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   maxerr
);
  localparam int DATA_W = 16;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, rst_n = 0, tick, in_valid = 0, out_valid;
  logic signed [DATA_W-1:0] in_re = 0, in_im = 0, out_re, out_im;
  logic [5:0] out_index;

  fft64_cordic_da #(.CHANNELS(CHANNELS)) dut (.*);

  always #5 clk = ~clk;

  int xr [NFRAMES][64], xi [NFRAMES][64];
  longint seen [NFRAMES];
  longint cyc = 0, first_out [NFRAMES];
  int out_frame = 0, out_cnt = 0;

  initial begin
    done = 0; checks = 0; failures = 0; maxerr = 0;
  end

  always @(posedge clk) cyc++;

  always @(posedge clk) begin
    if (rst_n && out_valid && out_frame < NFRAMES) begin
      real rr, ri, a; int er, ei, k;
      k  = int'(out_index);
      rr = 0; ri = 0;
      for (int n = 0; n < 64; n++) begin
        a  = -2.0 * PI * n * k / 64.0;
        rr += xr[out_frame][n] * $cos(a) - xi[out_frame][n] * $sin(a);
        ri += xr[out_frame][n] * $sin(a) + xi[out_frame][n] * $cos(a);
      end
      rr /= 64.0; ri /= 64.0;
      if (out_cnt == 0) first_out[out_frame] = cyc;
      er = int'(out_re) - $rtoi(rr + (rr >= 0 ? 0.5 : -0.5));
      ei = int'(out_im) - $rtoi(ri + (ri >= 0 ? 0.5 : -0.5));
      if (er < 0) er = -er;
      if (ei < 0) ei = -ei;
      if (er > maxerr) maxerr = er;
      if (ei > maxerr) maxerr = ei;
      checks++;
      if (er > TOL || ei > TOL) begin
        failures++;
        if (failures < 10)
          $display("C=%0d frame %0d k=%0d got (%0d,%0d) exp (%0.2f,%0.2f)",
                   CHANNELS, out_frame, out_index, out_re, out_im, rr, ri);
      end
      seen[out_frame] |= longint'(1) << out_index;
      out_cnt++;
      if (out_cnt == 64) begin
        checks++;
        if (seen[out_frame] != '1) begin
          failures++;
          $display("C=%0d frame %0d index coverage %h", CHANNELS, out_frame, seen[out_frame]);
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
        xr[f][n] = int'($urandom_range(46000)) - 23000;
        xi[f][n] = int'($urandom_range(46000)) - 23000;
      end
    end
    repeat (4) @(posedge clk);
    rst_n <= 1;
    for (int f = 0; f < NFRAMES; f++)
      for (int n = 0; n < 64; n++) begin
        in_valid = 1;
        in_re    = DATA_W'(xr[f][n]);
        in_im    = DATA_W'(xi[f][n]);
        do @(negedge clk); while (!tick);
        @(negedge clk);
      end
    in_valid = 0;
    wait (out_frame == NFRAMES);
    for (int f = 1; f < NFRAMES - 1; f++) begin
      checks++;
      if (first_out[f] - first_out[f-1] != 64 * longint'(dut.DIV)) begin
        failures++;
        $display("C=%0d frame %0d period %0d cycles", CHANNELS, f, first_out[f] - first_out[f-1]);
      end
    end
    $display("C=%0d: tick every %0d cycles, max error %0d LSB", CHANNELS, dut.DIV, maxerr);
    done = 1;
  end
endmodule
