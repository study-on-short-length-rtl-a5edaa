// tb_clk_div: checks that tick is a single-cycle pulse exactly every DIV
// cycles (DIV = 5, the document's 100 MHz to 20 MHz ratio) after reset.
module tb_clk_div;
  localparam int DIV = 5;
  logic clk = 0, rst_n = 0, tick;
  int checks = 0, failures = 0;
  clk_div #(.DIV(DIV)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int last, n;
    last = -1; n = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 2000; c++) begin
      @(negedge clk);
      if (tick) begin
        if (last >= 0) begin
          checks++;
          if (c - last != DIV) begin failures++; $display("period %0d", c - last); end
        end
        last = c;
        n++;
      end
    end
    checks++;
    if (n < 2000 / DIV - 1) begin failures++; $display("only %0d ticks", n); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
