// tb_workloads: the engine on the sizes it is meant for.
//
// Instance "seq" (default parameters, 1600 coefficients per frame) runs a
// sequence of 25,000 frames, the average length of the test videos the
// design was evaluated on. The external memory is a function of the address
// (the 256K-word memory wraps after 655 frames, as a circular frame buffer
// would), with a scene change every 50 frames. Every result is compared with
// a reference computed here from the same memory function, and the result
// period must stay at 800 cycles.
//
// Instance "big" (WORDS_PER_FRAME = 16383, i.e. 65,532 coefficients, close
// to the 65,536-pixel limit of the 16-bit counters) runs 4 frames that are
// all or mostly one luminance level, the worst case for counter and
// accumulator width: the 32-bit sums must not overflow.
module tb_workloads;
  import sim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle++;

  localparam int NSEQ = 25000, WPF = 400;
  localparam int NBIG = 4, WPF_BIG = 16383;

  // ---------------- memory functions ----------------
  function automatic int unsigned mix(int unsigned x);
    x = x ^ (x >> 16); x = x * 32'h7feb352d;
    x = x ^ (x >> 15); x = x * 32'h846ca68b;
    return x ^ (x >> 16);
  endfunction
  function automatic logic [31:0] seq_word(logic [17:0] a);
    int unsigned scene = (int'(a) / WPF) / 50;
    int base = int'(mix(scene) % 200) + 20;
    int spread = int'(mix(scene + 999) % 60) + 4;
    logic [31:0] w;
    for (int l = 0; l < 4; l++) begin
      int v = base + int'(mix({14'(a), 2'(l), 16'h1234}) % spread) - spread / 2;
      w[8*l +: 8] = 8'(v < 0 ? 0 : (v > 255 ? 255 : v));
    end
    return w;
  endfunction
  function automatic logic [31:0] big_word(logic [17:0] a);
    int f = int'(a) / WPF_BIG;
    case (f)
      0, 1: return 32'hC8C8_C8C8;                         // every coefficient 200
      2:    return (a % 5 == 0) ? 32'h1010_C8C8 : 32'hC8C8_C8C8;
      default: return {8'(mix(a) % 256), 8'(a), 8'h40, 8'h41};
    endcase
  endfunction

  // ---------------- reference ----------------
  typedef longint hist_a [NBINS];
  function automatic void hist_of(bit big, int f, ref longint h [NBINS]);
    int wpf = big ? WPF_BIG : WPF;
    foreach (h[k]) h[k] = 0;
    for (int w = 0; w < wpf; w++) begin
      logic [17:0] a = 18'(f * wpf + w);
      logic [31:0] d = big ? big_word(a) : seq_word(a);
      for (int l = 0; l < 4; l++) h[d[8*l+2 +: 6]]++;
    end
  endfunction
  function automatic longint wsum(longint a [NBINS], longint b [NBINS]);
    longint s = 0;
    for (int k = 0; k < NBINS; k++) begin
      longint w = b[k];
      if (k > 0)         w += b[k-1];
      if (k < NBINS - 1) w += b[k+1];
      s += a[k] * w;
    end
    return s;
  endfunction
  function automatic longint iroot(longint v);
    longint r = 0;
    for (int b = 15; b >= 0; b--) if ((r + (64'd1 << b)) * (r + (64'd1 << b)) <= v) r += (64'd1 << b);
    return r;
  endfunction

  // ---------------- the two engines ----------------
  logic        go_seq = 0, go_big = 0;
  logic        busy_s, done_s, rv_s, ovf_s, oe_s;
  logic        busy_b, done_b, rv_b, ovf_b, oe_b;
  logic [15:0] rf_s, rf_b;
  logic [17:0] addr_s, addr_b;
  logic [31:0] sim_s, num_s, den_s, sim_b, num_b, den_b;

  similarity_top u_seq (
    .clk(clk), .rst_n(rst_n), .pul_down(go_seq), .clk100_90(1'b1), .num_frames(16'(NSEQ)),
    .busy(busy_s), .seq_done(done_s), .sram_addr(addr_s), .sram_oe(oe_s),
    .sram_data(oe_s ? seq_word(addr_s) : 32'h0),
    .result_valid(rv_s), .result_frame(rf_s), .similarity(sim_s),
    .similarity_ovf(ovf_s), .numerator(num_s), .denominator(den_s));

  similarity_top #(.WORDS_PER_FRAME(WPF_BIG)) u_big (
    .clk(clk), .rst_n(rst_n), .pul_down(go_big), .clk100_90(1'b1), .num_frames(16'(NBIG)),
    .busy(busy_b), .seq_done(done_b), .sram_addr(addr_b), .sram_oe(oe_b),
    .sram_data(oe_b ? big_word(addr_b) : 32'h0),
    .result_valid(rv_b), .result_frame(rf_b), .similarity(sim_b),
    .similarity_ovf(ovf_b), .numerator(num_b), .denominator(den_b));

  // ---------------- checking ----------------
  longint hs_prev [NBINS], hs_cur [NBINS];
  int nres_s = 0, nres_b = 0, last_s = -1, n_low = 0;

  task automatic check(string who, int f, bit big, logic [31:0] num, logic [31:0] den,
                       logic [31:0] sim, logic ovf);
    longint hp [NBINS], hc [NBINS];
    longint en, ed, es;
    bit eo;
    hist_of(big, f - 1, hp);
    hist_of(big, f, hc);
    en = wsum(hp, hc);
    ed = iroot(wsum(hc, hc)) * iroot(wsum(hp, hp));
    eo = (ed == 0) || (en >= 2 * ed);
    es = eo ? 64'hFFFF_FFFF : (en << 31) / ed;
    checks++;
    if (num !== 32'(en) || den !== 32'(ed) || sim !== 32'(es) || ovf !== eo || en >= 2**32) begin
      failures++;
      $display("%s frame %0d: num %0d/%0d den %0d/%0d sim %h/%h", who, f, num, en, den, ed, sim, 32'(es));
    end
    if (big) $display("%s frame %0d: similarity %f num %0d den %0d", who, f, real'(sim) / 2.0**31, num, den);
    if (real'(sim) / 2.0**31 < 0.5) n_low++;
  endtask

  always @(posedge clk) if (rst_n && rv_s) begin
    check("seq", int'(rf_s), 0, num_s, den_s, sim_s, ovf_s);
    if (last_s >= 0) begin
      checks++;
      if (cycle - last_s != 2 * WPF) begin failures++; $display("period %0d", cycle - last_s); end
    end
    last_s = cycle;
    nres_s++;
  end
  always @(posedge clk) if (rst_n && rv_b) begin
    check("big", int'(rf_b), 1, num_b, den_b, sim_b, ovf_b);
    nres_b++;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk); go_seq = 1; go_big = 1;
    @(negedge clk); go_seq = 0; go_big = 0;
    wait (done_b);
    wait (done_s);
    @(posedge clk); @(negedge clk);
    checks += 3;
    if (nres_s != NSEQ - 1) begin failures++; $display("%0d sequence results", nres_s); end
    if (nres_b != NBIG - 1) begin failures++; $display("%0d big-frame results", nres_b); end
    if (n_low == 0) begin failures++; $display("no scene change seen"); end
    $display("sequence: %0d results, %0d below 0.5, finished at cycle %0d", nres_s, n_low, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSEQ * 2 * WPF + 10_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
