// tb_hist_bram: checks the asymmetric accumulator memory against a
// reference array: port-A writes and reads of single counters, port-B reads
// of pairs (low half = even address), the read-first behaviour of both
// ports and a port-B pair write (clear) while the same pair is read.
module tb_hist_bram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [9:0]  addr_a;
  logic        we_a = 0, we_b = 0;
  logic [15:0] din_a, dout_a;
  logic [8:0]  addr_b;
  logic [31:0] din_b, dout_b;
  logic [15:0] ref_mem [1024];
  int checks = 0, failures = 0;

  hist_bram dut (.*);

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    addr_a = 0; addr_b = 0; din_a = 0; din_b = 0;
    // fill through port A
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = 10'(i); din_a = 16'($urandom); ref_mem[i] = din_a;
    end
    @(negedge clk) we_a = 0;
    // read back through port A and in pairs through port B
    for (int i = 0; i < 300; i++) begin
      int a = int'($urandom_range(1023));
      int b = int'($urandom_range(511));
      @(negedge clk); addr_a = 10'(a); addr_b = 9'(b);
      @(negedge clk);
      chk(32'(dout_a), 32'(ref_mem[a]), "port A read");
      chk(dout_b, {ref_mem[2*b+1], ref_mem[2*b]}, "port B pair read");
    end
    // read-first: write A and read the old value in the same cycle
    @(negedge clk); addr_a = 10'd77; we_a = 1; din_a = 16'hBEEF;
    @(negedge clk); we_a = 0;
    chk(32'(dout_a), 32'(ref_mem[77]), "port A read-first");
    ref_mem[77] = 16'hBEEF;
    @(negedge clk);
    chk(32'(dout_a), 32'hBEEF, "port A after write");
    // clear pair through port B while reading it
    @(negedge clk); addr_b = 9'd38; we_b = 1; din_b = 0;
    @(negedge clk); we_b = 0;
    chk(dout_b, {ref_mem[77], ref_mem[76]}, "port B read while clearing");
    @(negedge clk);
    chk(dout_b, 32'h0, "port B pair cleared");
    addr_a = 10'd76;
    @(negedge clk);
    chk(32'(dout_a), 32'h0, "cleared counter seen on port A");
    addr_a = 10'd78;
    @(negedge clk);
    chk(32'(dout_a), 32'(ref_mem[78]), "neighbour untouched");
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
