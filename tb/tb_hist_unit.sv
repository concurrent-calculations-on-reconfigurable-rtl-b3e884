// tb_hist_unit: histograms of random frames are counted and read out.
//
// Frame 0 is counted into page 0 with narrow luminance spread, so the same
// bin recurs in successive words and the two-cycle read-modify-write is
// exercised; words arrive every two cycles, sometimes with gaps. Then frame
// 1 is counted into page 1 while page 0 is read out concurrently; the 32
// pairs must equal the reference histogram, arrive on consecutive cycles
// starting two cycles after the first read, and the page must read back as
// all zeros afterwards. The first pair appears three cycles after rd_start
// is sampled (cleared while read). Finally page 1 is read out.
module tb_hist_unit;
  import sim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic              word_valid = 0;
  logic [31:0]       word_data = 0;
  logic [PAGE_W-1:0] word_page = 0;
  logic              acc_busy;
  logic              rd_start = 0;
  logic [PAGE_W-1:0] rd_page = 0;
  logic              rd_busy, pair_valid;
  logic [4:0]        pair_idx;
  logic [31:0]       pair_data;
  logic              pair_last;
  int checks = 0, failures = 0;

  hist_unit dut (.*);

  localparam int NW = 400;
  int ref_h [2][NBINS];
  int exp_h [NBINS];
  int got_pairs = 0, first_pair_cycle = -1, rd_cycle = 0, cycle = 0;
  bit expect_zero = 0, no_check = 0;
  int n_overlap = 0;
  always @(posedge clk) cycle++;
  always @(posedge clk) if (word_valid && rd_busy) n_overlap++;

  // pair checker
  always @(posedge clk) if (rst_n && pair_valid) begin
    int k;
    k = int'(pair_idx);
    checks += 3;
    if (pair_last !== (k == NPAIRS - 1)) begin failures++; $display("pair_last wrong at %0d", k); end
    if (k != got_pairs) begin failures++; $display("pair index %0d expected %0d", k, got_pairs); end
    if (no_check) ;
    else if (expect_zero) begin
      if (pair_data !== 32'h0) begin failures++; $display("pair %0d not cleared: %h", k, pair_data); end
    end else if (pair_data !== {16'(exp_h[2*k+1]), 16'(exp_h[2*k])}) begin
      failures++;
      $display("pair %0d = %0d/%0d expected %0d/%0d", k, pair_data[31:16], pair_data[15:0],
               exp_h[2*k+1], exp_h[2*k]);
    end
    if (got_pairs == 0) begin
      first_pair_cycle = cycle;
      checks++;
      if (cycle - rd_cycle != 4) begin failures++; $display("read-out latency %0d", cycle - rd_cycle); end
    end else begin
      checks++;
      if (cycle - first_pair_cycle != got_pairs) begin failures++; $display("pairs not back-to-back"); end
    end
    got_pairs++;
  end

  task automatic count_frame(int pg, int base, int spread, bit with_readout, int rpg);
    for (int w = 0; w < NW; w++) begin
      @(negedge clk);
      word_valid = 1;
      word_page  = PAGE_W'(pg);
      for (int l = 0; l < 4; l++) begin
        int v = base + int'($urandom_range(spread));
        if (v > 255) v = 255;
        word_data[8*l +: 8] = 8'(v);
        ref_h[pg][v >> 2]++;
      end
      if (with_readout && w == 5) begin rd_start = 1; rd_page = PAGE_W'(rpg); rd_cycle = cycle; end
      @(negedge clk);
      word_valid = 0;
      rd_start = 0;
      if (w % 37 == 0) @(negedge clk);   // occasional gap
    end
  endtask

  task automatic readout(int pg, bit zero);
    got_pairs = 0;
    expect_zero = zero;
    @(negedge clk); rd_start = 1; rd_page = PAGE_W'(pg); rd_cycle = cycle;
    @(negedge clk); rd_start = 0;
    while (rd_busy) @(negedge clk);
    checks++;
    if (got_pairs != NPAIRS) begin failures++; $display("%0d pairs read", got_pairs); end
  endtask

  initial begin
    foreach (ref_h[p, b]) ref_h[p][b] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // clear both pages first (memories start with random contents)
    no_check = 1;
    readout(0, 0); readout(1, 0);
    no_check = 0;
    got_pairs = 0;
    count_frame(0, 100, 9, 0, 0);
    repeat (3) @(negedge clk);
    // page 0 read out while page 1 is counted
    exp_h = ref_h[0];
    got_pairs = 0; expect_zero = 0;
    count_frame(1, 0, 255, 1, 0);
    checks++;
    if (got_pairs != NPAIRS) begin failures++; $display("%0d pairs in overlapped read", got_pairs); end
    if (n_overlap == 0) begin failures++; $display("no overlap"); end
    repeat (3) @(negedge clk);
    readout(0, 1);                // cleared
    exp_h = ref_h[1];
    readout(1, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
