// tb_sqrt_stage: a sequence of frames is presented as (self sum, numerator)
// pairs in the order the correlation delivers them (self one cycle before
// the numerator). After each frame the stage must hold the numerator, the
// new root Q(n), the previous root Q(n-1) and the denominator Q(n)*Q(n-1),
// with has_prev low only for the first frame after clr. done must follow
// the self sum by 17 cycles (16 for the root, 1 for the product).
module tb_sqrt_stage;
  import sim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic self_valid = 0, num_valid = 0, clr = 0;
  acc_t sum_self = 0, sum_prev = 0;
  logic busy, done, has_prev;
  acc_t numerator, denominator;
  logic [15:0] q_cur, q_prev;
  int checks = 0, failures = 0;

  sqrt_stage dut (.*);

  function automatic longint ref_root(longint v);
    longint r = 0;
    for (int b = 15; b >= 0; b--) if ((r + (64'd1 << b)) * (r + (64'd1 << b)) <= v) r += (64'd1 << b);
    return r;
  endfunction

  longint prev_root;
  int nfirst = 0;

  task automatic frame(int idx, acc_t s, acc_t n);
    int lat;
    longint r;
    @(negedge clk); sum_self = s; self_valid = 1;
    @(negedge clk); self_valid = 0; sum_prev = n; num_valid = 1;
    @(negedge clk); num_valid = 0; sum_prev = 0;
    lat = 1;
    while (!done) begin @(negedge clk); lat++; end
    r = ref_root(longint'(s));
    checks += 5;
    if (lat != 17) begin failures++; $display("latency %0d", lat); end
    if (numerator !== n) begin failures++; $display("numerator %0d expected %0d", numerator, n); end
    if (q_cur !== 16'(r)) begin failures++; $display("Q(n) %0d expected %0d", q_cur, r); end
    if (has_prev !== (idx > 0)) begin failures++; $display("has_prev %0d at frame %0d", has_prev, idx); end
    if (idx > 0 && (q_prev !== 16'(prev_root) || denominator !== 32'(r * prev_root))) begin
      failures++; $display("denominator %0d expected %0d", denominator, r * prev_root);
    end
    if (idx == 0) nfirst++;
    prev_root = r;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int seq = 0; seq < 3; seq++) begin
      @(negedge clk) clr = 1;
      @(negedge clk) clr = 0;
      for (int f = 0; f < 20; f++) frame(f, $urandom, $urandom);
    end
    checks++;
    if (nfirst != 3) begin failures++; $display("first frames %0d", nfirst); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
