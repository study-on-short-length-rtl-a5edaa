// cordic_da_ctrl: controller of the CORDIC-DA branch FFT.
//
// After start it runs 8/CHANNELS passes of DATA_W+4 cycles. In pass p,
// channel c computes output k2 = p*CHANNELS + c of the 8-point DFT of group
// n1 with the twiddle W64^(n1*k2) merged in. The twiddle exponent is split as
//   nhat = (n1*k2) mod 8        -> index term of the DA look-up table
//   khat = floor(n1*k2 / 8)     -> a whole W8 step, folded into the CORDIC
// so CORDIC PE n rotates by W8^r with r = (n*k2 + khat) mod 8; its control
// word comes from the document's table (fft_pkg::PE_CTRL) and its 1/sqrt2
// flag is r odd. This split is the document's; the cycle plan is this
// design's own. Cycles of a pass, counted from the start cycle (0):
//   0            P/S converter loads (first pass only)
//   1..DATA_W    data bits 0..DATA_W-1 leave the P/S converter (shifting)
//   DATA_W+1     guard bit: the sign bit again (register is back in place)
//   2..DATA_W+2  the same bits, one cycle later, are accumulated by the DA
//   DATA_W+3     results valid (y_valid)
// All outputs are decoded from registered state. start is ignored while busy.
module cordic_da_ctrl
  import fft_pkg::*;
#(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned CHANNELS = 4
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [2:0] n1,
  output logic       busy,
  output logic       ps_load,
  output logic       ps_shift,
  output logic       ps_guard,
  output logic       lsb,
  output logic       da_en,
  output logic       da_first,
  output logic       da_sign,
  output logic       y_valid,
  output pe_ctrl_t   pe_ctrl [CHANNELS][8],
  output logic [7:0] scale   [CHANNELS],
  output logic [2:0] nhat    [CHANNELS],
  output logic [2:0] k2      [CHANNELS]
);
  localparam int unsigned NPASS = 8 / CHANNELS;
  localparam int unsigned LAST  = DATA_W + 3;
  localparam int unsigned CW    = $clog2(DATA_W + 4);
  localparam int unsigned PW    = (NPASS > 1) ? $clog2(NPASS) : 1;

  logic          active;
  logic [CW-1:0] cyc;
  logic [PW-1:0] pass;
  logic [2:0]    n1_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      active <= 1'b0;
      cyc    <= '0;
      pass   <= '0;
      n1_q   <= '0;
    end else if (!active) begin
      if (start) begin
        active <= 1'b1;
        cyc    <= CW'(1);
        pass   <= '0;
        n1_q   <= n1;
      end
    end else if (cyc == CW'(LAST)) begin
      cyc <= '0;
      if (pass == PW'(NPASS - 1)) active <= 1'b0;
      else                        pass   <= pass + 1'b1;
    end else begin
      cyc <= cyc + 1'b1;
    end
  end

  always_comb begin
    busy     = active;
    ps_load  = start && !active;
    ps_shift = active && cyc >= CW'(1) && cyc <= CW'(DATA_W);
    ps_guard = active && cyc == CW'(DATA_W + 1);
    lsb      = active && cyc == CW'(1);
    da_en    = active && cyc >= CW'(2) && cyc <= CW'(DATA_W + 2);
    da_first = active && cyc == CW'(2);
    da_sign  = active && cyc == CW'(DATA_W + 2);
    y_valid  = active && cyc == CW'(LAST);
  end

  always_comb begin
    for (int c = 0; c < CHANNELS; c++) begin
      logic [5:0] e;      // n1*k2, 0..49
      logic [2:0] kk, khat, r;
      kk      = 3'(int'(pass) * CHANNELS + c);
      e       = 6'(n1_q) * 6'(kk);
      khat    = e[5:3];
      k2[c]   = kk;
      nhat[c] = e[2:0];
      for (int n = 0; n < 8; n++) begin
        r             = 3'(n) * kk + khat;
        pe_ctrl[c][n] = PE_CTRL[r];
        scale[c][n]   = r[0];
      end
    end
  end
endmodule
