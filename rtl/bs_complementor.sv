// bs_complementor: one-bit-at-a-time (1-BAAT) bit-serial two's complementor.
//
// Negating a two's-complement word LSB first means copying bits up to and
// including the first 1 and inverting every bit after it. A flip-flop holds
// "a 1 has been seen" (kept with an OR gate); the output is the input XORed
// with that flag when neg is set, and the input unchanged otherwise. In the
// LSB cycle the flag from the previous word is ignored. Output is
// combinational; the flag is registered. Structure as in the document's CORDIC
// PE; the reset is this design's choice.
module bs_complementor (
  input  logic clk,
  input  logic rst_n,
  input  logic lsb,   // current bit is bit 0 of a new word
  input  logic neg,   // 1: output the negated word, 0: pass the word
  input  logic d,
  output logic q
);
  logic seen_q, seen;

  always_comb begin
    seen = lsb ? 1'b0 : seen_q;
    q    = d ^ (neg & seen);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) seen_q <= 1'b0;
    else        seen_q <= seen | d;
  end
endmodule
