// fft64_cordic_da: 64-point FFT processor for 802.11a with a CORDIC-DA first
// stage and a parallel 8-point second stage.
//
// X(8*k1 + k2) = sum_n1 [ W64^(n1*k2) * sum_n2 x(n1 + 8*n2) W8^(n2*k2) ] W8^(n1*k1)
// is computed in two radix-8 stages that run as a two-stage pipeline:
//   * input_buffer  : ping-pong banks; one fills with a frame of 64 samples
//                     (one per tick) while the first stage reads the other.
//   * first stage   : cordic_da_fft8 with CHANNELS datapaths. For group n1 it
//                     gives T(n1,k2) = W64^(n1*k2) * DFT8 / 8 for all k2,
//                     the twiddle merged into its look-up tables.
//   * matrix_buffer : the 8x8 results; row/column roles swap every frame so
//                     one buffer serves both stages without a second copy.
//   * second stage  : parallel_fft8 on column k2 gives X(8*k1 + k2)/64 for
//                     k1 = 0..7.
//   * output        : the eight results of a column leave one per tick with
//                     their index k (order k2 = 0..7 outer, k1 inner).
// Timing: work is done in runs of 8 slots; slot s lasts SLOT =
// (8/CHANNELS)*(DATA_W+4) cycles. A run starts when a full input bank or an
// unfinished frame is waiting. In slot s the first stage handles group n1 = s
// of the newest frame and the second stage reads column k2 = s of the frame
// before (in its first 8 cycles, before any write of that slot reaches the
// same words). A waiting frame with no successor is finished by a run of the
// second stage alone once the input pauses at a frame boundary. One frame is 64 ticks = 8 slots, so a continuous input stream
// runs without gaps: DIV = SLOT/8 fast cycles per sample (5 at the defaults:
// 100 MHz bit-serial clock for a 20 MHz sample rate).
// The sample-rate side is clocked by clk and enabled by tick instead of a
// divided clock. The architecture (CORDIC-DA first stage with merged twiddles,
// matrix buffer, parallel second stage, clock divider) follows the document;
// the slot schedule, the scaling by 1/64, the output order and the single
// clock are this design's. Reset is synchronous and active low.
module fft64_cordic_da #(
  parameter int unsigned DATA_W   = 16,
  parameter int unsigned CHANNELS = 4,
  parameter int unsigned LUT_W    = 16,
  parameter int unsigned ACC_W    = 23
) (
  input  logic                     clk,
  input  logic                     rst_n,
  output logic                     tick,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_re,
  input  logic signed [DATA_W-1:0] in_im,
  output logic                     out_valid,
  output logic [5:0]               out_index,
  output logic signed [DATA_W-1:0] out_re,
  output logic signed [DATA_W-1:0] out_im
);
  localparam int unsigned NPASS = 8 / CHANNELS;
  localparam int unsigned SLOT  = NPASS * (DATA_W + 4);
  localparam int unsigned DIV   = SLOT / 8;
  localparam int unsigned SW    = $clog2(SLOT);
  localparam int unsigned PTRW  = (CHANNELS > 1) ? $clog2(CHANNELS) : 1;

  initial begin
    assert (CHANNELS == 1 || CHANNELS == 2 || CHANNELS == 4)
      else $error("CHANNELS must be 1, 2 or 4");
    assert (SLOT % 8 == 0) else $error("slot length must be a multiple of 8");
  end

  clk_div #(.DIV(DIV)) u_div (.clk, .rst_n, .tick);

  // ------------------------------------------------------------ input side
  logic       wbank, rbank;
  logic [5:0] widx;
  logic [1:0] full;
  logic       in_we;

  assign in_we = tick && in_valid;

  // ------------------------------------------------------------ run sequencer
  logic          running, s1_act, s2_act;
  logic [2:0]    slot;
  logic [SW-1:0] scyc;
  logic          s1_bank, s1_swap, s2_swap;
  logic          wswap;                 // swap value for the next frame written
  logic          mb_pending, mb_pend_swap;
  logic          run_start, run_end;

  // A run for the waiting frame alone (flush) may only start while no frame is
  // half written: the frame after it would otherwise be claimed too late and
  // the input could overwrite its bank before the first stage has read it.
  // Runs follow each other without a gap: a new one may start in the last
  // cycle of the current one, so a continuous stream keeps its phase.
  assign run_end   = running && slot == 3'd7 && scyc == SW'(SLOT - 1);
  assign run_start = (!running || run_end) && (full[rbank] || (mb_pending && widx == '0));

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wbank <= 1'b0;
      widx  <= '0;
      full  <= '0;
    end else begin
      if (in_we) begin
        widx <= widx + 1'b1;
        if (widx == 6'd63) begin
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
        end
      end
      if (run_start && full[rbank]) full[rbank] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      running      <= 1'b0;
      s1_act       <= 1'b0;
      s2_act       <= 1'b0;
      slot         <= '0;
      scyc         <= '0;
      rbank        <= 1'b0;
      s1_bank      <= 1'b0;
      s1_swap      <= 1'b0;
      s2_swap      <= 1'b0;
      wswap        <= 1'b0;
      mb_pending   <= 1'b0;
      mb_pend_swap <= 1'b0;
    end else if (run_start) begin
      running    <= 1'b1;
      slot       <= '0;
      scyc       <= '0;
      s1_act     <= full[rbank];
      s1_bank    <= rbank;
      s1_swap    <= wswap;
      s2_act     <= mb_pending;
      s2_swap    <= mb_pend_swap;
      mb_pending <= full[rbank];
      mb_pend_swap <= wswap;
      if (full[rbank]) begin
        rbank <= ~rbank;
        wswap <= ~wswap;
      end
    end else if (running) begin
      if (scyc == SW'(SLOT - 1)) begin
        scyc <= '0;
        slot <= slot + 1'b1;
        if (slot == 3'd7) running <= 1'b0;
      end else begin
        scyc <= scyc + 1'b1;
      end
    end
  end

  // ------------------------------------------------------------ first stage
  logic signed [DATA_W-1:0] g_re [8], g_im [8];
  logic                     s1_start, s1_busy, s1_valid;
  logic [2:0]               s1_k2 [CHANNELS];
  logic signed [DATA_W-1:0] s1_re [CHANNELS], s1_im [CHANNELS];

  input_buffer #(.DATA_W(DATA_W)) u_ibuf (
    .clk, .wr_en(in_we), .wr_bank(wbank), .wr_addr(widx), .wr_re(in_re), .wr_im(in_im),
    .rd_bank(s1_bank), .rd_n1(slot), .rd_re(g_re), .rd_im(g_im));

  assign s1_start = running && s1_act && scyc == '0;

  cordic_da_fft8 #(.DATA_W(DATA_W), .CHANNELS(CHANNELS), .LUT_W(LUT_W), .ACC_W(ACC_W)) u_s1 (
    .clk, .rst_n, .start(s1_start), .n1(slot), .x_re(g_re), .x_im(g_im),
    .busy(s1_busy), .y_valid(s1_valid), .y_k2(s1_k2), .y_re(s1_re), .y_im(s1_im));

  // results of one pass are written one per cycle into the matrix buffer
  logic signed [DATA_W-1:0] wq_re [CHANNELS], wq_im [CHANNELS];
  logic [2:0]               wq_k2 [CHANNELS];
  logic [2:0]               wq_n1;
  logic                     wq_swap;
  logic [3:0]               wq_cnt;
  logic [PTRW-1:0]          wq_ptr;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wq_cnt <= '0;
      wq_ptr <= '0;
    end else if (s1_valid) begin
      wq_re   <= s1_re;
      wq_im   <= s1_im;
      wq_k2   <= s1_k2;
      wq_n1   <= slot;
      wq_swap <= s1_swap;
      wq_cnt  <= 4'(CHANNELS);
      wq_ptr  <= '0;
    end else if (wq_cnt != '0) begin
      wq_cnt <= wq_cnt - 1'b1;
      wq_ptr <= wq_ptr + 1'b1;
    end
  end

  // ------------------------------------------------------------ matrix buffer
  logic                     mb_rd_en;
  logic signed [DATA_W-1:0] mb_re, mb_im;
  logic [PTRW-1:0]          wptr;

  assign wptr     = wq_ptr;
  assign mb_rd_en = running && s2_act && scyc < SW'(8);

  matrix_buffer #(.DATA_W(DATA_W)) u_mbuf (
    .clk,
    .we(wq_cnt != '0), .wr_row(wq_n1), .wr_col(wq_k2[wptr]), .wr_swap(wq_swap),
    .wr_re(wq_re[wptr]), .wr_im(wq_im[wptr]),
    .rd_en(mb_rd_en), .rd_row(scyc[2:0]), .rd_col(slot), .rd_swap(s2_swap),
    .rd_re(mb_re), .rd_im(mb_im));

  // ------------------------------------------------------------ second stage
  logic signed [DATA_W-1:0] col_re [8], col_im [8];
  logic                     rd_v_q;
  logic [2:0]               rd_n1_q;
  logic [3:0]               col_cnt;
  logic [2:0]               col_k2, col_k2_q, col_k2_q2;
  logic                     s2_go;
  logic                     s2_valid;
  logic signed [DATA_W-1:0] s2_re [8], s2_im [8];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_v_q  <= 1'b0;
      col_cnt <= '0;
      s2_go   <= 1'b0;
    end else begin
      rd_v_q  <= mb_rd_en;
      rd_n1_q <= scyc[2:0];
      s2_go   <= 1'b0;
      if (rd_v_q) begin
        col_re[rd_n1_q] <= mb_re;
        col_im[rd_n1_q] <= mb_im;
        col_cnt         <= (col_cnt == 4'd7) ? 4'd0 : col_cnt + 1'b1;
        if (col_cnt == 4'd7) s2_go <= 1'b1;
      end
      if (mb_rd_en) col_k2 <= slot;
    end
  end

  parallel_fft8 #(.DATA_W(DATA_W)) u_s2 (
    .clk, .rst_n, .in_valid(s2_go), .x_re(col_re), .x_im(col_im),
    .out_valid(s2_valid), .y_re(s2_re), .y_im(s2_im));

  always_ff @(posedge clk) begin
    if (s2_go) col_k2_q <= col_k2;
    col_k2_q2 <= col_k2_q;
  end

  // ------------------------------------------------------------ output side
  logic signed [DATA_W-1:0] oq_re [8], oq_im [8];
  logic [2:0]               oq_k2;
  logic [2:0]               oq_k1;
  logic [3:0]               oq_cnt;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      oq_cnt    <= '0;
      out_valid <= 1'b0;
      out_index <= '0;
      out_re    <= '0;
      out_im    <= '0;
    end else begin
      out_valid <= 1'b0;
      if (tick && oq_cnt != '0) begin
        out_valid <= 1'b1;
        out_re    <= oq_re[0];
        out_im    <= oq_im[0];
        out_index <= {oq_k1, oq_k2};
        for (int i = 0; i < 7; i++) begin
          oq_re[i] <= oq_re[i+1];
          oq_im[i] <= oq_im[i+1];
        end
        oq_k1  <= oq_k1 + 1'b1;
        oq_cnt <= oq_cnt - 1'b1;
      end
      if (s2_valid) begin
        oq_re  <= s2_re;
        oq_im  <= s2_im;
        oq_k2  <= col_k2_q2;
        oq_k1  <= '0;
        oq_cnt <= 4'd8;
      end
    end
  end

  // ------------------------------------------------------------ checks
  // a new column may replace the output queue only when at most its last word
  // is still waiting and leaves in the same cycle
  assert property (@(posedge clk) disable iff (!rst_n)
                   s2_valid |-> (oq_cnt == 0) || (oq_cnt == 1 && tick))
    else $error("output queue overrun");
  // the first stage is idle whenever a slot begins
  assert property (@(posedge clk) disable iff (!rst_n) s1_start |-> !s1_busy)
    else $error("first stage still busy at slot start");
  // a frame may not be written into a bank that still waits for the first stage
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_we && widx == 6'd0) |-> !full[wbank])
    else $error("input overrun");
  // nor into the bank the first stage is reading
  assert property (@(posedge clk) disable iff (!rst_n)
                   (in_we && running && s1_act) |-> (wbank != s1_bank))
    else $error("input written into the bank being transformed");
endmodule
