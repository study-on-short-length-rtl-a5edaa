// da_accumulator: three-operand shift-accumulator of the DA stage.
//
// Bit columns arrive LSB first. Each enabled cycle the accumulator is halved
// (arithmetic shift right, the shifted-out bit is dropped) and two look-up
// table words are added, both aligned to the top of the register:
//   acc <- acc/2 + (op_a +/- op_b) * 2^(ACC_W-LUT_W-2)
// sub_b selects op_a - op_b. In the sign-bit cycle (sign = Ts) the whole term
// is subtracted, because the MSB of a two's-complement word has negative
// weight. first makes the cycle start from zero instead of acc/2, so one word
// follows another without a clear cycle. After the last (sign) column acc holds
// sum_j term_j * 2^(j - last) scaled by 2^(ACC_W-LUT_W-2). Shift-accumulate and
// the three-operand add follow the document; widths and first are this
// design's. acc is registered.
module da_accumulator #(
  parameter int unsigned LUT_W = 16,
  parameter int unsigned ACC_W = 23
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    first,
  input  logic                    sign,
  input  logic                    sub_b,
  input  logic [LUT_W-1:0]        op_a,
  input  logic [LUT_W-1:0]        op_b,
  output logic signed [ACC_W-1:0] acc
);
  localparam int unsigned X = ACC_W - LUT_W - 2;   // extra low-order bits

  logic signed [ACC_W-1:0] base, term, ea, eb;

  always_comb begin
    ea   = ACC_W'(op_a);
    eb   = ACC_W'(op_b);
    term = sub_b ? (ea - eb) : (ea + eb);
    term = term <<< X;
    if (sign) term = -term;
    if (first) base = '0;
    else       base = acc >>> 1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n)  acc <= '0;
    else if (en) acc <= base + term;
  end
endmodule
