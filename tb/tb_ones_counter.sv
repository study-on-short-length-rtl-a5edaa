// tb_ones_counter: exhaustive check of the ones counter against a bit loop.
module tb_ones_counter;
  logic [7:0] d;
  logic [3:0] cnt;
  int checks = 0, failures = 0;
  ones_counter dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int v = 0; v < 256; v++) begin
      int e;
      d = 8'(v);
      e = 0;
      for (int i = 0; i < 8; i++) if ((v >> i) & 1) e++;
      #1;
      checks++;
      if (int'(cnt) != e) begin failures++; $display("%b: got %0d exp %0d", d, cnt, e); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
