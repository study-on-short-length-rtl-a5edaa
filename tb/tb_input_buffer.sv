// tb_input_buffer: fills both banks with different random frames in natural
// order and reads every group n1 of each bank, expecting x(n1 + 8*n2) on
// output n2; bank 0 is then refilled while bank 1 must stay unchanged.
module tb_input_buffer;
  localparam int DATA_W = 16;
  logic clk = 0, wr_en = 0, wr_bank = 0, rd_bank = 0;
  logic [5:0] wr_addr = 0;
  logic [2:0] rd_n1 = 0;
  logic signed [DATA_W-1:0] wr_re = 0, wr_im = 0, rd_re [8], rd_im [8];
  int checks = 0, failures = 0;
  input_buffer #(.DATA_W(DATA_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    logic signed [DATA_W-1:0] fr [3][64], fi [3][64];
    int bank_of [3] = '{0, 1, 0};
    for (int f = 0; f < 3; f++)
      for (int n = 0; n < 64; n++) begin fr[f][n] = DATA_W'($urandom); fi[f][n] = DATA_W'($urandom); end
    for (int f = 0; f < 3; f++) begin
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        wr_en = 1; wr_bank = 1'(bank_of[f]); wr_addr = 6'(n); wr_re = fr[f][n]; wr_im = fi[f][n];
      end
      @(negedge clk) wr_en = 0;
      // newest frame in its bank, and (after frame 2) frame 1 still in bank 1
      for (int q = (f == 2) ? 1 : f; q <= f; q++)
        for (int g = 0; g < 8; g++) begin
          rd_bank = 1'(bank_of[q]); rd_n1 = 3'(g);
          #1;
          for (int n2 = 0; n2 < 8; n2++) begin
            checks++;
            if (rd_re[n2] !== fr[q][g + 8*n2] || rd_im[n2] !== fi[q][g + 8*n2]) begin
              failures++;
              $display("frame %0d n1=%0d n2=%0d wrong", q, g, n2);
            end
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
