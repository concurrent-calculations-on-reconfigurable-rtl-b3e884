// hist_unit: luminance histogram of one frame, four coefficients per word.
//
// Each 32-bit word from external memory carries four 8-bit DC coefficients.
// Lane l (0..3) owns its own accumulator memory (hist_bram); the upper six
// bits of the lane's coefficient select one of 64 bins, and together with a
// 4-bit page number form the 10-bit port-A address. A counter is updated by
// read-modify-write over two cycles: the address is registered and read in
// the first cycle, the old count plus one is written back in the second.
// Words must therefore arrive no faster than one every two cycles, which is
// the rate of the external memory; an assertion checks it.
//
// Read-out: rd_start (with rd_page) walks the 32 bin pairs of a page over
// port B. Port B writes zero in the same cycle it reads, so the page is
// cleared as it is read and is ready for a later frame. The four lanes'
// pairs are added in two levels (lanes 0+1 and 2+3, registered, then the
// final sum), giving pair_data = {H[2k+1], H[2k]} on pair_valid, with
// pair_idx = k; pair_last marks pair 31. pair_valid for pair k follows two cycles after the pair is
// addressed; one read-out lasts 32 cycles plus that latency. Accumulation
// and read-out may run together on different pages.
//
// Lane assignment, bin selection by the upper bits, the page field use and
// the read-out latency are this design's choices; the structure (four
// memories as accumulators, increment on port A, pairs on a 32-bit port B
// forced to zero, two-level adder, address registers) follows the described
// circuit.
module hist_unit
  import sim_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  // coefficient words
  input  logic                   word_valid,
  input  logic [BUS_W-1:0]       word_data,
  input  logic [PAGE_W-1:0]      word_page,
  output logic                   acc_busy,     // an update is still in flight
  // read-out / clear
  input  logic                   rd_start,
  input  logic [PAGE_W-1:0]      rd_page,
  output logic                   rd_busy,
  output logic                   pair_valid,
  output logic [$clog2(NPAIRS)-1:0] pair_idx,
  output logic [2*HIST_W-1:0]    pair_data,
  output logic                   pair_last     // pair_valid for the last pair
);
  localparam int unsigned A_AW = PAGE_W + BIN_W;
  localparam int unsigned PW   = $clog2(NPAIRS);

  // ---------------- accumulation (port A) ----------------
  logic            s1_v, s2_v;
  logic [A_AW-1:0] s1_addr [LANES];
  logic [A_AW-1:0] s2_addr [LANES];
  logic [A_AW-1:0] addr_a  [LANES];
  logic [HIST_W-1:0] dout_a [LANES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_v <= 1'b0;
      s2_v <= 1'b0;
    end else begin
      s1_v <= word_valid;
      s2_v <= s1_v;
    end
  end

  always_ff @(posedge clk) begin
    for (int l = 0; l < LANES; l++) begin
      if (word_valid)
        s1_addr[l] <= {word_page, word_data[l*PIX_W + PIX_W-1 -: BIN_W]};
      s2_addr[l] <= s1_addr[l];
    end
  end

  always_comb
    for (int l = 0; l < LANES; l++)
      addr_a[l] = s2_v ? s2_addr[l] : s1_addr[l];

  assign acc_busy = s1_v | s2_v;

  // ---------------- read-out / clear (port B) ----------------
  logic          rd_run;
  logic [PW-1:0] rd_cnt;
  logic [PAGE_W-1:0] rd_pg;
  logic          b_v, r1_v;
  logic [PW-1:0] b_idx, r1_idx;
  logic [2*HIST_W-1:0] dout_b [LANES];
  logic [HIST_W-1:0] s01_lo, s01_hi, s23_lo, s23_hi;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_run <= 1'b0;
      rd_cnt <= '0;
      rd_pg  <= '0;
      b_v    <= 1'b0;
      r1_v   <= 1'b0;
    end else begin
      if (rd_start && !rd_run) begin
        rd_run <= 1'b1;
        rd_cnt <= '0;
        rd_pg  <= rd_page;
      end else if (rd_run) begin
        rd_cnt <= rd_cnt + 1'b1;
        if (rd_cnt == PW'(NPAIRS-1)) rd_run <= 1'b0;
      end
      b_v  <= rd_run;
      r1_v <= b_v;
    end
  end

  always_ff @(posedge clk) begin
    b_idx  <= rd_cnt;
    r1_idx <= b_idx;
    s01_lo <= dout_b[0][HIST_W-1:0]        + dout_b[1][HIST_W-1:0];
    s01_hi <= dout_b[0][2*HIST_W-1:HIST_W] + dout_b[1][2*HIST_W-1:HIST_W];
    s23_lo <= dout_b[2][HIST_W-1:0]        + dout_b[3][HIST_W-1:0];
    s23_hi <= dout_b[2][2*HIST_W-1:HIST_W] + dout_b[3][2*HIST_W-1:HIST_W];
  end

  assign rd_busy    = rd_run | b_v | r1_v;
  assign pair_valid = r1_v;
  assign pair_idx   = r1_idx;
  assign pair_last  = r1_v && (r1_idx == PW'(NPAIRS-1));
  assign pair_data  = {s01_hi + s23_hi, s01_lo + s23_lo};

  // ---------------- the four accumulator memories ----------------
  for (genvar l = 0; l < LANES; l++) begin : g_lane
    hist_bram #(.A_ADDR_W(A_AW), .A_DATA_W(HIST_W)) u_ram (
      .clk    (clk),
      .addr_a (addr_a[l]),
      .we_a   (s2_v),
      .din_a  (dout_a[l] + 1'b1),
      .dout_a (dout_a[l]),
      .addr_b ({rd_pg, rd_cnt}),
      .we_b   (rd_run),
      .din_b  ('0),
      .dout_b (dout_b[l])
    );
  end

  // Two-cycle read-modify-write: back-to-back words would collide on port A.
  a_word_rate: assert property (@(posedge clk) disable iff (!rst_n)
    word_valid |-> !s1_v);
  // The page being read out must not be the page being accumulated.
  a_page_split: assert property (@(posedge clk) disable iff (!rst_n)
    (rd_run && s2_v) |-> (s2_addr[0][A_AW-1 -: PAGE_W] != rd_pg));
endmodule
