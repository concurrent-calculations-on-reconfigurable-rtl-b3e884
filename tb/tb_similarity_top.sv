// tb_similarity_top: end-to-end test of the similarity engine at its
// default size (64 bins, 400 words = 1600 coefficients per frame).
//
// Two sequences are run: 7 frames, then, after the engine is idle again,
// 3 frames. Frames are drawn from "scenes" (a base luminance with random
// spread); the scene changes at chosen frames so that both high and low
// similarities occur. A reference model in this testbench computes the
// histograms, windowed sums, integer roots, product and fixed-point quotient
// independently of the RTL and every result is compared with it, together
// with numerator and denominator. The time between consecutive results is
// checked against the 800-cycle frame period, and the time from a frame's
// last word to its result against the back end's 115 cycles. Mechanisms that must occur at
// least once are counted: the wait for the trigger level, the erase phase, the special first frame (no
// result), page alternation, histogram accumulation overlapping the back
// end, the root starting before the correlation ends, and the held windowed
// values (W meeting the previous frame's histogram).
module tb_similarity_top;
  import sim_pkg::*;

  localparam int WPF     = 400;
  localparam int NF1     = 7;
  localparam int NF2     = 3;
  localparam int NFRAMES = NF1 + NF2;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pul_down = 0;
  logic        clk100_90 = 0;
  int          trig_phase = 0;
  // trigger level: high 4 cycles out of 9
  always @(posedge clk) begin
    trig_phase <= (trig_phase + 1) % 9;
    clk100_90  <= (trig_phase >= 5);
  end
  logic [15:0] num_frames = 0;
  logic        busy, seq_done, result_valid, similarity_ovf;
  logic [15:0] result_frame;
  logic [17:0] sram_addr, load_addr;
  logic        sram_oe, load_we;
  logic [31:0] sram_data, load_data;
  logic [31:0] similarity, numerator, denominator;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  similarity_top dut (
    .clk(clk), .rst_n(rst_n), .pul_down(pul_down), .clk100_90(clk100_90),
    .num_frames(num_frames),
    .busy(busy), .seq_done(seq_done),
    .sram_addr(sram_addr), .sram_oe(sram_oe), .sram_data(sram_data),
    .result_valid(result_valid), .result_frame(result_frame),
    .similarity(similarity), .similarity_ovf(similarity_ovf),
    .numerator(numerator), .denominator(denominator));

  ext_sram #(.ADDR_W(18), .DATA_W(32)) u_sram (
    .clk(clk), .addr(sram_addr), .oe(sram_oe), .rdata(sram_data),
    .we(load_we), .waddr(load_addr), .wdata(load_data));

  // ---------------- stimulus and reference ----------------
  int unsigned coef  [NFRAMES][WPF*4];
  longint      hist  [NFRAMES][NBINS];
  longint      exp_num [NFRAMES], exp_den [NFRAMES], exp_sim [NFRAMES];
  bit          exp_ovf [NFRAMES];

  function automatic longint isqrt_ref(longint v);
    longint r = 0;
    while ((r + 1) * (r + 1) <= v) r++;
    return r;
  endfunction

  function automatic longint wsum(int a, int b);  // sum H[a][k] * W[b][k]
    longint s = 0;
    for (int k = 0; k < NBINS; k++) begin
      longint w = hist[b][k];
      if (k > 0)         w += hist[b][k-1];
      if (k < NBINS - 1) w += hist[b][k+1];
      s += hist[a][k] * w;
    end
    return s;
  endfunction

  task automatic make_frames();
    int base = 60, spread = 40;
    for (int f = 0; f < NFRAMES; f++) begin
      if (f == 3) begin base = 170; spread = 30; end   // cut inside sequence 1
      if (f == 5) begin base = 175; spread = 35; end   // small change
      if (f == NF1) begin base = 20; spread = 250; end // new sequence, wide spread
      if (f == NF1 + 2) begin base = 120; spread = 8; end
      foreach (hist[f][k]) hist[f][k] = 0;
      for (int i = 0; i < WPF * 4; i++) begin
        int v = base + int'($urandom_range(spread)) - spread / 2;
        if (v < 0) v = 0;
        if (v > 255) v = 255;
        coef[f][i] = v;
        hist[f][v >> 2]++;
      end
    end
    // references, each sequence on its own
    for (int f = 0; f < NFRAMES; f++) begin
      if (f == 0 || f == NF1) continue;
      exp_num[f] = wsum(f - 1, f);
      exp_den[f] = isqrt_ref(wsum(f, f)) * isqrt_ref(wsum(f - 1, f - 1));
      exp_ovf[f] = (exp_den[f] == 0) || (exp_num[f] >= 2 * exp_den[f]);
      exp_sim[f] = exp_ovf[f] ? 64'hFFFF_FFFF : (exp_num[f] << 31) / exp_den[f];
    end
  endtask

  task automatic load_sram(int first, int count);
    for (int f = 0; f < count; f++)
      for (int w = 0; w < WPF; w++) begin
        @(negedge clk);
        load_we   = 1;
        load_addr = 18'(f * WPF + w);
        load_data = {8'(coef[first+f][4*w+3]), 8'(coef[first+f][4*w+2]),
                     8'(coef[first+f][4*w+1]), 8'(coef[first+f][4*w])};
      end
    @(negedge clk) load_we = 0;
  endtask

  // ---------------- result checking ----------------
  int seq_base = 0;
  int nresults = 0, last_res_cycle = -1;
  int n_period_ok = 0;
  always @(posedge clk) if (rst_n && result_valid) begin
    int f;
    f = seq_base + int'(result_frame);
    checks += 3;
    if (numerator !== 32'(exp_num[f])) begin
      failures++; $display("frame %0d numerator %0d expected %0d", f, numerator, exp_num[f]);
    end
    if (denominator !== 32'(exp_den[f])) begin
      failures++; $display("frame %0d denominator %0d expected %0d", f, denominator, exp_den[f]);
    end
    if (similarity !== 32'(exp_sim[f]) || similarity_ovf !== exp_ovf[f]) begin
      failures++; $display("frame %0d similarity %h expected %h", f, similarity, 32'(exp_sim[f]));
    end
    $display("frame %0d: similarity %f (num %0d den %0d) at cycle %0d", f,
             real'(similarity) / 2.0**31, numerator, denominator, cycle);
    if (last_res_cycle >= 0 && int'(result_frame) > 1) begin
      checks++;
      if (cycle - last_res_cycle != 2 * WPF) begin
        failures++; $display("result period %0d, expected %0d", cycle - last_res_cycle, 2 * WPF);
      end else n_period_ok++;
    end
    last_res_cycle = cycle;
    nresults++;
  end

  // back-end latency: last word of frame n accepted -> result of (n-1, n)
  localparam int BACKEND_LAT = 115;
  int last_word_cycle = 0, n_lat_ok = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.word_valid && dut.word_last) last_word_cycle = cycle;
    if (result_valid) begin
      checks++;
      if (cycle - last_word_cycle != BACKEND_LAT) begin
        failures++; $display("back-end latency %0d, expected %0d", cycle - last_word_cycle, BACKEND_LAT);
      end else n_lat_ok++;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_erase = 0, n_first = 0, n_page0 = 0, n_page1 = 0, n_overlap = 0;
  int n_early_root = 0, n_wheld = 0, n_trig = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.fst == dut.u_ctrl.F_ERASE1 && dut.rd_start) n_erase++;
    if (dut.u_ctrl.fst == dut.u_ctrl.F_TRIGGER) n_trig++;
    if (dut.sqrt_done && !dut.has_prev) n_first++;
    if (dut.word_valid && dut.word_page == 0) n_page0++;
    if (dut.word_valid && dut.word_page == 1) n_page1++;
    if (dut.word_valid && dut.u_ctrl.bst != dut.u_ctrl.B_IDLE) n_overlap++;
    if (dut.self_done && !dut.corr_done) n_early_root++;
    if (dut.u_corr.tg1.v && dut.u_corr.tg1.sel) n_wheld++;
  end

  task automatic run_seq(int nf);
    @(negedge clk);
    num_frames = 16'(nf);
    pul_down   = 1;
    @(negedge clk) pul_down = 0;
    wait (seq_done);
    @(posedge clk);
    @(negedge clk);
    checks++;
    if (busy) begin failures++; $display("busy after seq_done"); end
  endtask

  initial begin
    load_we = 0; load_addr = 0; load_data = 0;
    make_frames();
    load_sram(0, NF1);
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_seq(NF1);
    checks++;
    if (nresults != NF1 - 1) begin failures++; $display("results %0d", nresults); end
    load_sram(NF1, NF2);
    seq_base = NF1;
    run_seq(NF2);
    checks++;
    if (nresults != NFRAMES - 2) begin failures++; $display("results %0d", nresults); end
    checks++;
    if (n_trig == 0) begin failures++; $display("trigger wait never happened"); end
    $display("trigger-wait %0d cycles", n_trig);
    $display("erase %0d first-frame %0d pages %0d/%0d overlap %0d early-root %0d W-held %0d period-ok %0d",
             n_erase, n_first, n_page0, n_page1, n_overlap, n_early_root, n_wheld, n_period_ok);
    checks += 7;
    if (n_erase != 2)    begin failures++; $display("erase phase count"); end
    if (n_first != 2)    begin failures++; $display("first-frame count"); end
    if (n_page0 == 0 || n_page1 == 0) begin failures++; $display("pages not alternated"); end
    if (n_overlap == 0)  begin failures++; $display("no overlap"); end
    if (n_early_root == 0) begin failures++; $display("no early root"); end
    if (n_wheld == 0)    begin failures++; $display("W never held"); end
    if (n_period_ok == 0) begin failures++; $display("period never checked"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
