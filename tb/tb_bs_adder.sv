// tb_bs_adder: checks the bit-serial adder on back-to-back random 17-bit words
// (LSB first, lsb marking bit 0, random carry-in c0) against a + b + c0.
module tb_bs_adder;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, lsb = 0, c0 = 0, a = 0, b = 0, s;
  int checks = 0, failures = 0;
  bs_adder dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [W-1:0] wa, wb, got, exp;
    logic cin;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      wa = W'($urandom); wb = W'($urandom); cin = 1'($urandom);
      if (t == 0) begin wa = '1; wb = W'(1); cin = 1; end   // carry through every bit
      for (int j = 0; j < W; j++) begin
        a = wa[j]; b = wb[j]; lsb = (j == 0); c0 = cin;
        #1 got[j] = s;
        @(negedge clk);
      end
      exp = wa + wb + W'(cin);
      checks++;
      if (got !== exp) begin
        failures++;
        $display("%h + %h + %0d: got %h exp %h", wa, wb, cin, got, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
