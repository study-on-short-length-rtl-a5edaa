// tb_matrix_buffer: writes frame A row by row with swap = 0, then, column by
// column, reads column s of A (swap 0) and at once writes row s of frame B
// (swap 1) in place; every read of A must be intact. Frame B is then read
// column by column with swap 1 while frame C is written with swap 0, and C
// is read at the end. Reads are checked one cycle after rd_en.
module tb_matrix_buffer;
  localparam int DATA_W = 16;
  logic clk = 0, we = 0, wr_swap = 0, rd_en = 0, rd_swap = 0;
  logic [2:0] wr_row = 0, wr_col = 0, rd_row = 0, rd_col = 0;
  logic signed [DATA_W-1:0] wr_re = 0, wr_im = 0, rd_re, rd_im;
  int checks = 0, failures = 0;
  matrix_buffer #(.DATA_W(DATA_W)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  function automatic int val(int f, int r, int c, int part);
    return (f * 1000 + r * 64 + c * 8 + part * 3) % 30000 - 15000;
  endfunction
  initial begin
    // frame 0 written row-major, swap 0
    for (int r = 0; r < 8; r++)
      for (int c = 0; c < 8; c++) begin
        @(negedge clk);
        we = 1; wr_swap = 0; wr_row = 3'(r); wr_col = 3'(c);
        wr_re = DATA_W'(val(0, r, c, 0)); wr_im = DATA_W'(val(0, r, c, 1));
      end
    @(negedge clk) we = 0;
    for (int f = 1; f <= 3; f++) begin
      for (int s = 0; s < 8; s++) begin
        // read column s of frame f-1 (eight cycles, data one cycle later)
        for (int r = 0; r <= 8; r++) begin
          if (r > 0) begin
            checks++;
            if (rd_re !== DATA_W'(val(f - 1, r - 1, s, 0)) || rd_im !== DATA_W'(val(f - 1, r - 1, s, 1))) begin
              failures++;
              $display("frame %0d (%0d,%0d): got %0d,%0d", f - 1, r - 1, s, rd_re, rd_im);
            end
          end
          rd_en = (r < 8); rd_swap = 1'((f - 1) % 2); rd_row = 3'(r); rd_col = 3'(s);
          @(negedge clk);
        end
        rd_en = 0;
        // write row s of frame f with the other orientation
        if (f < 3)
          for (int c = 0; c < 8; c++) begin
            we = 1; wr_swap = 1'(f % 2); wr_row = 3'(s); wr_col = 3'(c);
            wr_re = DATA_W'(val(f, s, c, 0)); wr_im = DATA_W'(val(f, s, c, 1));
            @(negedge clk);
          end
        we = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
