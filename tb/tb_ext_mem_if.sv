// tb_ext_mem_if: the interface reads 3 frames of 400 words from the memory
// model, whose words are a hash of their address. Every delivered word must
// carry the data of the next address in sequence, words must come exactly
// every two cycles with no gap between frames, word_last must mark words
// 399, 799 and 1199, pages must alternate 0/1/0 with the frame number, and
// the interface must stop (busy low, no more words) after the last frame.
module tb_ext_mem_if;
  import sim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic        start = 0;
  logic [15:0] num_frames = 0;
  logic [17:0] sram_addr;
  logic        sram_oe;
  logic [31:0] sram_data;
  logic        word_valid, word_last, busy;
  logic [31:0] word_data;
  logic [PAGE_W-1:0] word_page;
  logic [15:0] word_frame;
  int checks = 0, failures = 0;

  ext_mem_if dut (.*);

  function automatic logic [31:0] hash(logic [17:0] a);
    return {a[7:0] ^ 8'h5A, a[17:10], 6'(a[5:0] * 3), a[9:0]};
  endfunction
  // asynchronous memory model
  assign sram_data = sram_oe ? hash(sram_addr) : 32'h0;

  localparam int NF = 3, WPF = 400;
  int nwords = 0, last_cycle = -1, cycle = 0;
  always @(posedge clk) cycle++;

  always @(posedge clk) if (rst_n && word_valid) begin
    int f;
    f = nwords / WPF;
    checks += 5;
    if (word_data !== hash(18'(nwords))) begin
      failures++; $display("word %0d data %h expected %h", nwords, word_data, hash(18'(nwords)));
    end
    if (word_last !== ((nwords % WPF) == WPF - 1)) begin failures++; $display("word_last at %0d", nwords); end
    if (word_page !== PAGE_W'(f % 2)) begin failures++; $display("page at %0d", nwords); end
    if (word_frame !== 16'(f)) begin failures++; $display("frame at %0d", nwords); end
    if (last_cycle >= 0 && cycle - last_cycle != 2) begin
      failures++; $display("word %0d after %0d cycles", nwords, cycle - last_cycle);
    end
    last_cycle = cycle;
    nwords++;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk); start = 1; num_frames = 16'(NF);
    @(negedge clk); start = 0;
    wait (!busy);
    repeat (10) @(negedge clk);
    checks += 2;
    if (nwords != NF * WPF) begin failures++; $display("%0d words", nwords); end
    if (sram_oe) begin failures++; $display("still reading"); end
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
