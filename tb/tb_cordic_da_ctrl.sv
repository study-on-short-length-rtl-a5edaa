// tb_cordic_da_ctrl: starts the controller for every group n1 and checks, for
// each pass and channel, the output index k2, the residual twiddle index
// (n1*k2) mod 8, and for each PE the rotation r = (n*k2 + floor(n1*k2/8)) mod 8
// through its control word and 1/sqrt2 flag. It also checks the cycle plan of
// a pass: load in the start cycle, DATA_W shifts, guard, lsb, DA enable/first/
// sign and y_valid in the DATA_W+4-th cycle, and that busy ends after the last
// pass.
module tb_cordic_da_ctrl;
  import fft_pkg::*;
  localparam int DATA_W = 16, CHANNELS = 4, NPASS = 8 / CHANNELS, PL = DATA_W + 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [2:0] n1 = 0;
  logic busy, ps_load, ps_shift, ps_guard, lsb, da_en, da_first, da_sign, y_valid;
  pe_ctrl_t pe_ctrl [CHANNELS][8];
  logic [7:0] scale [CHANNELS];
  logic [2:0] nhat [CHANNELS], k2 [CHANNELS];
  int checks = 0, failures = 0;
  cordic_da_ctrl #(.DATA_W(DATA_W), .CHANNELS(CHANNELS)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic expect_bit(string what, logic got, logic exp, int cyc);
    checks++;
    if (got !== exp) begin failures++; $display("%s at cycle %0d: got %0d", what, cyc, got); end
  endtask
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int g = 0; g < 8; g++) begin
      int shifts;
      n1 = 3'(g); start = 1;
      #1 expect_bit("ps_load", ps_load, 1'b1, 0);
      @(negedge clk) start = 0;
      for (int p = 0; p < NPASS; p++) begin
        shifts = 0;
        for (int cyc = (p == 0) ? 1 : 0; cyc < PL; cyc++) begin
          if (ps_shift) shifts++;
          expect_bit("ps_load",  ps_load,  1'b0, cyc);
          expect_bit("lsb",      lsb,      cyc == 1, cyc);
          expect_bit("ps_guard", ps_guard, cyc == DATA_W + 1, cyc);
          expect_bit("da_en",    da_en,    cyc >= 2 && cyc <= DATA_W + 2, cyc);
          expect_bit("da_first", da_first, cyc == 2, cyc);
          expect_bit("da_sign",  da_sign,  cyc == DATA_W + 2, cyc);
          expect_bit("y_valid",  y_valid,  cyc == PL - 1, cyc);
          expect_bit("busy",     busy,     1'b1, cyc);
          if (cyc == 5) begin
            for (int c = 0; c < CHANNELS; c++) begin
              int kk, e;
              kk = p * CHANNELS + c;
              e  = g * kk;
              checks++;
              if (int'(k2[c]) != kk || int'(nhat[c]) != e % 8) begin
                failures++;
                $display("n1=%0d pass %0d ch %0d: k2 %0d nhat %0d", g, p, c, k2[c], nhat[c]);
              end
              for (int n = 0; n < 8; n++) begin
                int r;
                r = (n * kk + e / 8) % 8;
                checks++;
                if (pe_ctrl[c][n] !== PE_CTRL[r] || scale[c][n] !== 1'(r % 2)) begin
                  failures++;
                  $display("n1=%0d k2=%0d n=%0d: ctrl %b scale %b, r=%0d", g, kk, n, pe_ctrl[c][n], scale[c][n], r);
                end
              end
            end
          end
          @(negedge clk);
        end
        checks++;
        if (shifts != DATA_W) begin failures++; $display("%0d shifts", shifts); end
      end
      expect_bit("busy after last pass", busy, 1'b0, PL);
      repeat (g % 3) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
