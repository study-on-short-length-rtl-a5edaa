// matrix_buffer: 8x8-word inter-stage buffer with row/column swapping.
//
// The first radix-8 stage writes its results group by group (row n1, all
// columns k2); the second stage needs them column by column (all n1 of one
// k2). With one plain buffer the next frame's writes would overwrite words not
// yet read. Here the meaning of row and column is swapped every frame: the
// physical address is {row, col} when swap = 0 and {col, row} when swap = 1.
// A frame written with swap = p is read with swap = p, and the next frame is
// written with swap = !p, so the next frame's group n1 = s lands exactly on
// the words of the previous frame's column k2 = s, which the second stage has
// already read. The swapping scheme is the document's (from prior work); the
// dual-port register-file form (one write and one registered read per cycle)
// follows the document's choice of a dual-port register file.
// Read data appear the cycle after rd_en and hold until the next read.
module matrix_buffer #(
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  // write port
  input  logic                     we,
  input  logic [2:0]               wr_row,
  input  logic [2:0]               wr_col,
  input  logic                     wr_swap,
  input  logic signed [DATA_W-1:0] wr_re,
  input  logic signed [DATA_W-1:0] wr_im,
  // read port
  input  logic                     rd_en,
  input  logic [2:0]               rd_row,
  input  logic [2:0]               rd_col,
  input  logic                     rd_swap,
  output logic signed [DATA_W-1:0] rd_re,
  output logic signed [DATA_W-1:0] rd_im
);
  logic [2*DATA_W-1:0] mem [64];
  logic [5:0] wa, ra;

  always_comb begin
    wa = wr_swap ? {wr_col, wr_row} : {wr_row, wr_col};
    ra = rd_swap ? {rd_col, rd_row} : {rd_row, rd_col};
  end

  always_ff @(posedge clk) begin
    if (we)    mem[wa] <= {wr_re, wr_im};
    if (rd_en) {rd_re, rd_im} <= mem[ra];
  end
endmodule
