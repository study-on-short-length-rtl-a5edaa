// tb_bs_complementor: checks the bit-serial two's complementor on back-to-back
// random 17-bit words, with and without negation, against -w and w.
module tb_bs_complementor;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, lsb = 0, neg = 0, d = 0, q;
  int checks = 0, failures = 0;
  bs_complementor dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] w, got, exp;
    logic ng;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      w = W'($urandom); ng = 1'($urandom);
      if (t < 4) w = (t == 0) ? '0 : (t == 1) ? W'(1) : (t == 2) ? W'(1) << 10 : '1;
      for (int j = 0; j < W; j++) begin
        d = w[j]; lsb = (j == 0); neg = ng;
        #1 got[j] = q;
        @(negedge clk);
      end
      exp = ng ? -w : w;
      checks++;
      if (got !== exp) begin
        failures++;
        $display("neg=%0d %h: got %h exp %h", ng, w, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
