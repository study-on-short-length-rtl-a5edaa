// tb_da_accumulator: feeds 17 columns of random table words (first column
// marked first, last marked sign) and compares the final accumulator with
// 2^5 * sum_j (op_a +/- op_b)_j * 2^(j-16), the sign column counted negative,
// computed exactly here; the dropped low bits allow an error below 2.
// Both the add and the subtract (sub_b) variants are tested, plus en = 0 hold.
module tb_da_accumulator;
  localparam int LUT_W = 16, ACC_W = 23, NB = 17, X = ACC_W - LUT_W - 2;
  logic clk = 0, rst_n = 0, en = 0, first = 0, sign = 0, sub_b = 0;
  logic [LUT_W-1:0] op_a = 0, op_b = 0;
  logic signed [ACC_W-1:0] acc;
  int checks = 0, failures = 0;
  da_accumulator #(.LUT_W(LUT_W), .ACC_W(ACC_W)) dut (.*);
  function automatic real rabs(real v); return (v < 0) ? -v : v; endfunction
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 400; t++) begin
      real exp;
      logic signed [ACC_W-1:0] held;
      sub_b = t[0];
      exp = 0;
      for (int j = 0; j < NB; j++) begin
        real term;
        en = 1; first = (j == 0); sign = (j == NB - 1);
        op_a = LUT_W'($urandom_range(46000 / 2)); op_b = LUT_W'($urandom_range(46000 / 2));
        term = sub_b ? real'(op_a) - real'(op_b) : real'(op_a) + real'(op_b);
        if (sign) term = -term;
        exp += term * (2.0 ** (j - (NB - 1))) * (2.0 ** X);
        @(negedge clk);
      end
      en = 0;
      checks++;
      if (rabs(real'(acc) - exp) >= 2.0) begin
        failures++;
        $display("got %0d exp %f", acc, exp);
      end
      held = acc;
      @(negedge clk);
      checks++;
      if (acc !== held) begin failures++; $display("acc moved while en = 0"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
