// ps_converter: parallel-to-serial converter shared by all CORDIC-DA channels.
//
// Sixteen DATA_W-bit registers hold the real and imaginary parts of the eight
// input words. On load they take the words in parallel. While shift is high
// they rotate right by one bit per clock, and the current LSB of each register
// is the serial output, so a word leaves LSB first. The rotation is circular:
// after DATA_W shifts every register holds its word again, which lets the same
// eight words be streamed once per pass without a reload, and shifting stops
// (shift low) whenever the pipeline is idle. Both follow the document.
// For the extra guard bit the serial datapath needs, guard selects the sign
// bit (MSB) instead of the LSB; that is this design's way to sign-extend.
// Outputs are taken from the registers (no combinational path from d_*).
module ps_converter #(
  parameter int unsigned DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     load,
  input  logic                     shift,
  input  logic                     guard,
  input  logic signed [DATA_W-1:0] d_re [8],
  input  logic signed [DATA_W-1:0] d_im [8],
  output logic [7:0]               b_re,
  output logic [7:0]               b_im
);
  logic [DATA_W-1:0] sr_re [8];
  logic [DATA_W-1:0] sr_im [8];

  always_ff @(posedge clk) begin
    for (int n = 0; n < 8; n++) begin
      if (load) begin
        sr_re[n] <= d_re[n];
        sr_im[n] <= d_im[n];
      end else if (shift) begin
        sr_re[n] <= {sr_re[n][0], sr_re[n][DATA_W-1:1]};
        sr_im[n] <= {sr_im[n][0], sr_im[n][DATA_W-1:1]};
      end
    end
  end

  always_comb begin
    for (int n = 0; n < 8; n++) begin
      b_re[n] = guard ? sr_re[n][DATA_W-1] : sr_re[n][0];
      b_im[n] = guard ? sr_im[n][DATA_W-1] : sr_im[n][0];
    end
  end
endmodule
