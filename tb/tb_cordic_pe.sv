// tb_cordic_pe: drives random complex words bit-serially (16-bit values
// sign-extended to 17 bits) through the CORDIC PE with each of the eight
// control words and compares with the unscaled W8^r rotations written out
// here from the rotation-matrix table: r odd gives sqrt2 * W8^r.
module tb_cordic_pe;
  import fft_pkg::*;
  localparam int W = 17;
  logic clk = 0, rst_n = 0, lsb = 0, xr = 0, xi = 0, yr, yi;
  pe_ctrl_t ctrl = '0;
  int checks = 0, failures = 0;
  cordic_pe dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int a, b, er, ei;
    logic [W-1:0] wr, wi, gr, gi;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 800; t++) begin
      int r;
      r = t % 8;
      a = int'($urandom_range(65534)) - 32767;
      b = int'($urandom_range(65534)) - 32767;
      case (r)
        0: begin er =  a;     ei =  b;     end
        1: begin er =  a + b; ei = -a + b; end
        2: begin er =  b;     ei = -a;     end
        3: begin er = -a + b; ei = -a - b; end
        4: begin er = -a;     ei = -b;     end
        5: begin er = -a - b; ei =  a - b; end
        6: begin er = -b;     ei =  a;     end
        default: begin er = a - b; ei = a + b; end
      endcase
      wr = W'(a); wi = W'(b);
      for (int j = 0; j < W; j++) begin
        xr = wr[j]; xi = wi[j]; lsb = (j == 0); ctrl = PE_CTRL[r];
        #1 begin gr[j] = yr; gi[j] = yi; end
        @(negedge clk);
      end
      checks++;
      if (gr !== W'(er) || gi !== W'(ei)) begin
        failures++;
        $display("r=%0d x=(%0d,%0d): got (%0d,%0d) exp (%0d,%0d)", r, a, b,
                 $signed(gr), $signed(gi), er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
