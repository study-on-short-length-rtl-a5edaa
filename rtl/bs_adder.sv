// bs_adder: one-bit-at-a-time (1-BAAT) bit-serial adder.
//
// Operands arrive LSB first, one bit per clock. A single full adder forms the
// sum bit; its carry-out is kept in a flip-flop and fed back as the carry-in of
// the next bit. In the LSB cycle (lsb = 1) the stored carry is ignored and the
// external carry-in c0 is used instead, so a new word can follow the previous
// one without a gap. The sum bit is combinational (same cycle as the operand
// bits); the carry is registered. This is the adder of the document's CORDIC
// PE; only the reset of the carry flip-flop is this design's choice.
module bs_adder (
  input  logic clk,
  input  logic rst_n,
  input  logic lsb,   // current bits are bit 0 of a new word
  input  logic c0,    // carry-in used at bit 0
  input  logic a,
  input  logic b,
  output logic s
);
  logic carry_q, cin;

  always_comb begin
    cin = lsb ? c0 : carry_q;
    s   = a ^ b ^ cin;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) carry_q <= 1'b0;
    else        carry_q <= (a & b) | (a & cin) | (b & cin);
  end
endmodule
