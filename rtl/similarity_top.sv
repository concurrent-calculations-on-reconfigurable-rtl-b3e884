// similarity_top: frame-to-frame similarity of a video sequence from
// luminance histograms, for shot-boundary (temporal segmentation) analysis.
//
// For consecutive frames n-1 and n the engine computes
//   f = sum_b H[n-1][b]*W[n][b] / ( sqrt(sum_b H[n-1][b]*W[n-1][b]) * sqrt(sum_b H[n][b]*W[n][b]) )
// where H is the 64-level histogram of the frame's 8-bit DC coefficients and
// W[b] = H[b-1] + H[b] + H[b+1] its windowed form. A low value marks a cut.
//
// Data path: ext_mem_if streams the frames from the external 32-bit static
// RAM, one word (four coefficients) every two cycles; hist_unit counts them
// in four block-memory accumulators, alternating between two pages frame by
// frame. When a frame is complete its page is read out (and cleared) as 32
// bin pairs into wcorr_unit, which forms both sums of products in a
// pipelined, six-wide windowed correlation; sqrt_stage takes the root of the
// frame's self term and multiplies it with the root kept from the previous
// frame; divider gives the quotient as an unsigned fixed-point number with
// 31 fraction bits (1.0 = 32'h8000_0000). controller sequences all of it.
//
// Timing: with 1600 coefficients per frame the histogram stage takes 800
// cycles per frame and the rest of the work (115 cycles) overlaps the
// next frame's histogram, so one result leaves every 800 cycles; the first
// result follows the second frame. Interface: pulse pul_down with
// num_frames >= 1 while busy is low; the engine then waits for clk100_90
// to be high (a synchronous level, the trigger of the start-up sequence)
// before it erases the histogram memories and starts; result_valid pulses for every pair
// (n-1, n) with result_frame = n; seq_done pulses after the last frame.
// The external RAM must return the word at sram_addr within two cycles.
module similarity_top
  import sim_pkg::*;
#(
  parameter int unsigned WORDS_PER_FRAME = 400,
  parameter int unsigned SRAM_ADDR_W     = 18,
  parameter int unsigned FRAME_W         = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pul_down,
  input  logic               clk100_90,
  input  logic [FRAME_W-1:0] num_frames,
  output logic               busy,
  output logic               seq_done,
  // external static RAM
  output logic [SRAM_ADDR_W-1:0] sram_addr,
  output logic               sram_oe,
  input  logic [BUS_W-1:0]   sram_data,
  // results
  output logic               result_valid,
  output logic [FRAME_W-1:0] result_frame,
  output logic [ACC_W-1:0]   similarity,
  output logic               similarity_ovf,
  output logic [ACC_W-1:0]   numerator,
  output logic [ACC_W-1:0]   denominator
);
  // external memory interface <-> histogram
  logic               mem_start, word_valid, word_last, mem_busy;
  logic [BUS_W-1:0]   word_data;
  logic [PAGE_W-1:0]  word_page;
  logic [FRAME_W-1:0] word_frame;
  // histogram read-out
  logic               rd_start, rd_busy, acc_busy, pair_valid, pair_last, store_en, st_page;
  logic [PAGE_W-1:0]  rd_page;
  logic [$clog2(NPAIRS)-1:0] pair_idx;
  logic [2*HIST_W-1:0] pair_data;
  // correlation, root, division
  logic               corr_start, corr_page, corr_busy, self_done, corr_done;
  acc_t               sum_prev, sum_self;
  logic               sqrt_clr, sqrt_busy, sqrt_done, has_prev;
  logic [ROOT_W-1:0]  q_cur, q_prev;
  logic               div_start, div_busy, div_done;

  ext_mem_if #(
    .WORDS_PER_FRAME(WORDS_PER_FRAME), .ADDR_W(SRAM_ADDR_W), .FRAME_W(FRAME_W)
  ) u_mem (
    .clk(clk), .rst_n(rst_n), .start(mem_start), .num_frames(num_frames),
    .sram_addr(sram_addr), .sram_oe(sram_oe), .sram_data(sram_data),
    .word_valid(word_valid), .word_data(word_data), .word_page(word_page),
    .word_last(word_last), .word_frame(word_frame), .busy(mem_busy));

  hist_unit u_hist (
    .clk(clk), .rst_n(rst_n),
    .word_valid(word_valid), .word_data(word_data), .word_page(word_page),
    .acc_busy(acc_busy),
    .rd_start(rd_start), .rd_page(rd_page), .rd_busy(rd_busy),
    .pair_valid(pair_valid), .pair_idx(pair_idx), .pair_data(pair_data),
    .pair_last(pair_last));

  wcorr_unit u_corr (
    .clk(clk), .rst_n(rst_n),
    .st_valid(pair_valid && store_en), .st_idx(pair_idx), .st_data(pair_data),
    .st_page(st_page),
    .start(corr_start), .cur_page(corr_page), .busy(corr_busy),
    .self_done(self_done), .done(corr_done),
    .sum_prev(sum_prev), .sum_self(sum_self));

  sqrt_stage u_root (
    .clk(clk), .rst_n(rst_n),
    .self_valid(self_done), .sum_self(sum_self),
    .num_valid(corr_done), .sum_prev(sum_prev), .clr(sqrt_clr),
    .busy(sqrt_busy), .done(sqrt_done), .has_prev(has_prev),
    .numerator(numerator), .denominator(denominator),
    .q_cur(q_cur), .q_prev(q_prev));

  divider #(.W(ACC_W)) u_div (
    .clk(clk), .rst_n(rst_n), .start(div_start),
    .num(numerator), .den(denominator),
    .busy(div_busy), .done(div_done), .quot(similarity), .ovf(similarity_ovf));

  controller #(.FRAME_W(FRAME_W)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .pul_down(pul_down), .clk100_90(clk100_90),
    .num_frames(num_frames), .busy(busy), .seq_done(seq_done),
    .mem_start(mem_start), .word_valid(word_valid), .word_last(word_last),
    .word_page(word_page), .word_frame(word_frame),
    .rd_start(rd_start), .rd_page(rd_page), .rd_busy(rd_busy),
    .rd_last(pair_last), .store_en(store_en), .st_page(st_page),
    .corr_start(corr_start), .corr_page(corr_page), .corr_done(corr_done),
    .sqrt_clr(sqrt_clr), .sqrt_done(sqrt_done), .has_prev(has_prev),
    .div_start(div_start), .div_done(div_done),
    .result_valid(result_valid), .result_frame(result_frame));
endmodule
