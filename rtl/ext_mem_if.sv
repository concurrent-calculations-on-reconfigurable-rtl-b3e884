// ext_mem_if: reads the coefficient words of successive frames from the
// external static RAM.
//
// The frames lie one after the other in the external memory, each
// WORDS_PER_FRAME 32-bit words (four 8-bit DC coefficients per word) long,
// starting at address 0. After a start pulse the interface reads num_frames
// frames without a gap. Each address is held for two clock cycles and the
// data are sampled at the end of the second cycle, so the memory sees an
// access time of two internal cycles (10 ns at a 200 MHz internal clock) and
// one word is delivered every two cycles: 800 cycles for a 1600-coefficient
// frame. Every delivered word carries the page of its frame (the frame
// number's lowest bit, widened to the page field), so consecutive frames are
// counted in alternate histogram pages, and word_last marks the last word of
// a frame. sram_oe is high while a read is in progress.
//
// Frame size, bus width and word rate follow the described design; the
// memory layout, the two-cycle sampling point and the handshake are this
// design's choices.
module ext_mem_if
  import sim_pkg::*;
#(
  parameter int unsigned WORDS_PER_FRAME = 400,
  parameter int unsigned ADDR_W          = 18,   // 256K words of 32 bits
  parameter int unsigned FRAME_W         = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                start,
  input  logic [FRAME_W-1:0]  num_frames,
  // external static RAM
  output logic [ADDR_W-1:0]   sram_addr,
  output logic                sram_oe,
  input  logic [BUS_W-1:0]    sram_data,
  // coefficient words
  output logic                word_valid,
  output logic [BUS_W-1:0]    word_data,
  output logic [PAGE_W-1:0]   word_page,
  output logic                word_last,
  output logic [FRAME_W-1:0]  word_frame,
  output logic                busy
);
  localparam int unsigned WCW = $clog2(WORDS_PER_FRAME);

  logic               ph;
  logic [WCW-1:0]     wcnt;
  logic [FRAME_W-1:0] fcnt, nfr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      ph         <= 1'b0;
      wcnt       <= '0;
      fcnt       <= '0;
      nfr        <= '0;
      sram_addr  <= '0;
      word_valid <= 1'b0;
      word_data  <= '0;
      word_page  <= '0;
      word_last  <= 1'b0;
      word_frame <= '0;
    end else begin
      word_valid <= 1'b0;
      word_last  <= 1'b0;
      if (start && !busy) begin
        busy      <= (num_frames != '0);
        ph        <= 1'b0;
        wcnt      <= '0;
        fcnt      <= '0;
        nfr       <= num_frames;
        sram_addr <= '0;
      end else if (busy) begin
        ph <= ~ph;
        if (ph) begin
          word_valid <= 1'b1;
          word_data  <= sram_data;
          word_page  <= PAGE_W'(fcnt[0]);
          word_frame <= fcnt;
          sram_addr  <= sram_addr + 1'b1;
          if (wcnt == WCW'(WORDS_PER_FRAME-1)) begin
            word_last <= 1'b1;
            wcnt      <= '0;
            fcnt      <= fcnt + 1'b1;
            if (fcnt == nfr - 1'b1) busy <= 1'b0;
          end else begin
            wcnt <= wcnt + 1'b1;
          end
        end
      end
    end
  end

  assign sram_oe = busy;
endmodule
