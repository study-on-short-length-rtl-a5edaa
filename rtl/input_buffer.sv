// input_buffer: ping-pong input memory of the 64-point FFT.
//
// Two banks of 64 complex words: while samples of one frame are written, in
// natural order and one per sample slot, into one bank, the first FFT stage
// reads the previous frame from the other. The first stage needs the eight
// words x(n1 + 8*n2), n2 = 0..7, of a group at once to load its
// parallel-to-serial converter, so each bank is organised as eight sub-banks
// selected by n2 = addr[5:3]; one read returns one word from every sub-bank.
// Writes are synchronous; the group read is combinational from the registers.
// The ping-pong use of two banks follows the document's dual-memory scheme;
// the sub-bank organisation is this design's.
module input_buffer #(
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic                     wr_bank,
  input  logic [5:0]               wr_addr,   // sample index n within the frame
  input  logic signed [DATA_W-1:0] wr_re,
  input  logic signed [DATA_W-1:0] wr_im,
  input  logic                     rd_bank,
  input  logic [2:0]               rd_n1,
  output logic signed [DATA_W-1:0] rd_re [8],
  output logic signed [DATA_W-1:0] rd_im [8]
);
  // mem[bank][n2][n1]
  logic signed [DATA_W-1:0] mem_re [2][8][8];
  logic signed [DATA_W-1:0] mem_im [2][8][8];

  always_ff @(posedge clk) begin
    if (wr_en) begin
      mem_re[wr_bank][wr_addr[5:3]][wr_addr[2:0]] <= wr_re;
      mem_im[wr_bank][wr_addr[5:3]][wr_addr[2:0]] <= wr_im;
    end
  end

  always_comb begin
    for (int n2 = 0; n2 < 8; n2++) begin
      rd_re[n2] = mem_re[rd_bank][n2][rd_n1];
      rd_im[n2] = mem_im[rd_bank][n2][rd_n1];
    end
  end
endmodule
