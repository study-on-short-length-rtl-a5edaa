// tb_ps_converter: loads eight random complex words, shifts DATA_W times and
// rebuilds every word from the serial bits (LSB first); the guard cycle must
// give the sign bit; a second pass without reload must give the same bits
// (circular shift); and with shift low the outputs must not move.
module tb_ps_converter;
  localparam int DATA_W = 16;
  logic clk = 0, load = 0, shift = 0, guard = 0;
  logic signed [DATA_W-1:0] d_re [8], d_im [8];
  logic [7:0] b_re, b_im;
  int checks = 0, failures = 0;
  ps_converter #(.DATA_W(DATA_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic [DATA_W-1:0] gr [8], gi [8];
    for (int t = 0; t < 50; t++) begin
      for (int n = 0; n < 8; n++) begin d_re[n] = DATA_W'($urandom); d_im[n] = DATA_W'($urandom); end
      @(negedge clk) load = 1;
      @(negedge clk) load = 0;
      for (int p = 0; p < 2; p++) begin
        // hold: no shift for a few cycles
        repeat (3) @(negedge clk);
        checks++;
        for (int n = 0; n < 8; n++)
          if (b_re[n] !== d_re[n][0] || b_im[n] !== d_im[n][0]) begin failures++; break; end
        for (int j = 0; j < DATA_W; j++) begin
          shift = 1;
          for (int n = 0; n < 8; n++) begin gr[n][j] = b_re[n]; gi[n][j] = b_im[n]; end
          @(negedge clk);
        end
        shift = 0; guard = 1;
        #1;
        for (int n = 0; n < 8; n++) begin
          checks++;
          if (gr[n] !== d_re[n] || gi[n] !== d_im[n] || b_re[n] !== d_re[n][DATA_W-1] || b_im[n] !== d_im[n][DATA_W-1]) begin
            failures++;
            $display("pass %0d word %0d: got %h/%h exp %h/%h", p, n, gr[n], gi[n], d_re[n], d_im[n]);
          end
        end
        @(negedge clk) guard = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
