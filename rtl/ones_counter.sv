// ones_counter: number of 1 bits among eight inputs (0..8).
//
// In the DA stage the sum of a column of CORDIC output bits is just the number
// of ones, which shrinks the look-up table address from eight bits to a count.
// Purely combinational.
module ones_counter (
  input  logic [7:0] d,
  output logic [3:0] cnt
);
  always_comb begin
    cnt = '0;
    for (int i = 0; i < 8; i++) cnt = cnt + 4'(d[i]);
  end
endmodule
