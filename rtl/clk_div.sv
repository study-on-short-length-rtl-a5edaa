// clk_div: digital clock divider of the FFT processor, as a clock enable.
//
// The bit-serial datapath runs on the fast clock; the sample-rate side (input
// and output words, 20 MHz in 802.11a) needs one slot every DIV fast cycles.
// Instead of a second clock this block gives a one-cycle pulse, tick, every
// DIV cycles, and the sample-rate logic is clocked by clk and enabled by tick.
// That replacement of a divided clock by an enable is this design's choice.
// tick is registered; the first pulse comes DIV cycles after reset is released.
module clk_div #(
  parameter int unsigned DIV = 5
) (
  input  logic clk,
  input  logic rst_n,
  output logic tick
);
  localparam int unsigned CW = (DIV > 1) ? $clog2(DIV) : 1;
  logic [CW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      tick <= 1'b0;
    end else begin
      tick <= (cnt == CW'(DIV - 1));
      if (cnt == CW'(DIV - 1)) cnt <= '0;
      else                     cnt <= cnt + 1'b1;
    end
  end
endmodule
