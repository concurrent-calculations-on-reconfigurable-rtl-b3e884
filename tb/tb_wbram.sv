// tb_wbram: checks the intermediate-store memory against a reference array:
// independent writes on both ports, reads on both ports in the same cycle,
// and read-first behaviour.
module tb_wbram;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [8:0]  addr_a = 0, addr_b = 0;
  logic        we_a = 0, we_b = 0;
  logic [31:0] din_a = 0, din_b = 0, dout_a, dout_b;
  logic [31:0] ref_mem [512];
  int checks = 0, failures = 0;

  wbram dut (.*);

  task automatic chk(logic [31:0] got, logic [31:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++; $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 256; i++) begin
      @(negedge clk);
      we_a = 1; addr_a = 9'(2*i);   din_a = $urandom; ref_mem[2*i]   = din_a;
      we_b = 1; addr_b = 9'(2*i+1); din_b = $urandom; ref_mem[2*i+1] = din_b;
    end
    @(negedge clk) begin we_a = 0; we_b = 0; end
    for (int i = 0; i < 300; i++) begin
      int a = int'($urandom_range(511));
      int b = int'($urandom_range(511));
      @(negedge clk); addr_a = 9'(a); addr_b = 9'(b);
      @(negedge clk);
      chk(dout_a, ref_mem[a], "port A read");
      chk(dout_b, ref_mem[b], "port B read");
    end
    @(negedge clk); addr_a = 9'd5; we_a = 1; din_a = 32'h1234_5678; addr_b = 9'd5;
    @(negedge clk); we_a = 0;
    chk(dout_a, ref_mem[5], "read-first A");
    chk(dout_b, ref_mem[5], "read-first B");
    @(negedge clk);
    chk(dout_b, 32'h1234_5678, "write A seen on B");
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
