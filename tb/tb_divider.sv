// tb_divider: quotients floor(num * 2^31 / den) for ratios around 1.0, small
// ratios, exact cases and random operands, compared with 64-bit arithmetic;
// ratios of 2 or more and a zero divisor must saturate with ovf set. The
// latency from start to done must be 32 cycles.
module tb_divider;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        start = 0, busy, done, ovf;
  logic [31:0] num = 0, den = 0, quot;
  int checks = 0, failures = 0, n_ovf = 0;

  divider dut (.*);

  task automatic one(logic [31:0] n, logic [31:0] d);
    int lat;
    longint unsigned e;
    logic eo;
    eo = (d == 0) || (longint'(n) >= 2 * longint'(d));
    e  = eo ? 64'hFFFF_FFFF : ((longint'(n) << 31) / longint'(d));
    @(negedge clk); num = n; den = d; start = 1;
    @(negedge clk); start = 0;
    lat = 0;
    while (!done) begin @(negedge clk); lat++; end
    checks += 3;
    if (quot !== 32'(e)) begin
      failures++; $display("%0d / %0d = %h expected %h", n, d, quot, 32'(e));
    end
    if (ovf !== eo) begin failures++; $display("ovf %0d for %0d / %0d", ovf, n, d); end
    if (eo) n_ovf++;
    if (lat != 32) begin failures++; $display("latency %0d", lat); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    one(100, 100); one(99, 100); one(101, 100); one(199, 100); one(200, 100);
    one(0, 7); one(5, 0); one(32'hFFFF_FFFF, 32'hFFFF_FFFF); one(1, 32'hFFFF_FFFF);
    one(32'hFFFF_FFFF, 32'h8000_0000);
    for (int i = 0; i < 300; i++) begin
      logic [31:0] d = $urandom | 1;
      logic [31:0] n;
      if (i % 2 == 0) n = d - 32'($urandom_range(1000));   // near 1.0
      else            n = $urandom >> $urandom_range(31);
      one(n, d);
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("saturation never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
