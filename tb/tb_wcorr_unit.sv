// tb_wcorr_unit: random histograms are stored page by page (as 32 pairs per
// frame, the way the histogram unit delivers them) and, after each store
// from the second frame on, the correlation is run with the new frame as
// the current page. sum_prev and sum_self are compared with a reference
// that windows the histogram with zero bins outside 0..63. Edge bins 0 and
// 63 are often made large, so the boundary handling matters. done must come
// 28 cycles after start and self_done one cycle before done.
module tb_wcorr_unit;
  import sim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        st_valid = 0, st_page = 0, start = 0, cur_page = 0;
  logic [4:0]  st_idx = 0;
  logic [31:0] st_data = 0;
  logic        busy, self_done, done;
  acc_t        sum_prev, sum_self;
  int checks = 0, failures = 0;

  wcorr_unit dut (.*);

  localparam int NFR = 12;
  int h [NFR][NBINS];

  function automatic longint wsum(int a, int b);
    longint s = 0;
    for (int k = 0; k < NBINS; k++) begin
      longint w = h[b][k];
      if (k > 0)         w += h[b][k-1];
      if (k < NBINS - 1) w += h[b][k+1];
      s += longint'(h[a][k]) * w;
    end
    return s;
  endfunction

  task automatic make_hist(int f);
    int total = 1600;
    foreach (h[f][k]) h[f][k] = 0;
    if (f % 3 == 1) begin h[f][0] = 500; h[f][63] = 400; total -= 900; end
    if (f == 5) total = 60000;                         // near the 16-bit limit
    for (int i = 0; i < total; i++) h[f][$urandom_range(f % 2 ? 63 : 20)]++;
  endtask

  task automatic store(int f);
    for (int k = 0; k < NPAIRS; k++) begin
      @(negedge clk);
      st_valid = 1; st_idx = 5'(k); st_page = f[0];
      st_data = {16'(h[f][2*k+1]), 16'(h[f][2*k])};
    end
    @(negedge clk) st_valid = 0;
  endtask

  task automatic correlate(int f);
    int lat = 0, lat_self = -1;
    @(negedge clk); start = 1; cur_page = f[0];
    @(negedge clk); start = 0;
    while (!done) begin
      if (self_done) lat_self = lat;
      @(negedge clk); lat++;
    end
    checks += 4;
    if (sum_prev !== 32'(wsum(f - 1, f))) begin
      failures++; $display("frame %0d sum_prev %0d expected %0d", f, sum_prev, wsum(f - 1, f));
    end
    if (sum_self !== 32'(wsum(f, f))) begin
      failures++; $display("frame %0d sum_self %0d expected %0d", f, sum_self, wsum(f, f));
    end
    if (lat != 28) begin failures++; $display("done after %0d cycles", lat); end
    if (lat_self != 27) begin failures++; $display("self_done after %0d cycles", lat_self); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < NFR; f++) begin
      make_hist(f);
      store(f);
      if (f > 0) correlate(f);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
