// tb_isqrt: square roots of edge values (0, 1, perfect squares and their
// neighbours, 2^32-1) and random 32-bit values, compared with a root found
// by a reference search; the latency from start to done must be 16 cycles.
module tb_isqrt;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        start = 0, busy, done;
  logic [31:0] din = 0;
  logic [15:0] root;
  int checks = 0, failures = 0;

  isqrt dut (.*);

  function automatic longint ref_root(longint v);
    longint lo = 0, hi = 65536;        // invariant lo^2 <= v < hi^2
    while (hi - lo > 1) begin
      longint mid = (lo + hi) / 2;
      if (mid * mid <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  task automatic one(logic [31:0] v);
    int lat = 0;
    @(negedge clk); din = v; start = 1;
    @(negedge clk); start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks += 2;
    if (root !== 16'(ref_root(longint'(v)))) begin
      failures++; $display("sqrt(%0d) = %0d expected %0d", v, root, ref_root(longint'(v)));
    end
    if (lat != 16) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(0); one(1); one(2); one(3); one(4); one(32'hFFFF_FFFF); one(32'hFFFE_0001);
    one(32'hFFFE_0000); one(32'h4000_0000); one(32'h3FFF_FFFF);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] v = $urandom;
      if (i % 3 == 0) v = v >> ($urandom_range(31));
      one(v);
    end
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
