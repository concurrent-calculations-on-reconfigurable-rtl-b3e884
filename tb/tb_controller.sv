// tb_controller: the controller is run against simple timing models of the
// units it drives: a read-out that is busy for 34 cycles, a word stream of
// 400 words per frame (one every two cycles, pages alternating), a
// correlation that finishes 28 cycles after its start, a root stage that
// finishes 16 cycles after that and reports a predecessor from its second
// root on, and a 32-cycle division. The read-out model marks its last
// busy cycle with rd_last. Two sequences (5 and 2 frames) are run.
// The trigger level clk100_90 is high three cycles out of seven. Checked:
// nothing is erased while waiting for the trigger; the erase phase reads out pages 0 and 1 before the memory is
// started; each frame's page is read out into the store two cycles after
// its last word; the correlation starts on the same page with the last pair;
// a division runs for every frame but the first of a sequence; results name
// the right frame; seq_done ends each sequence and the controller goes idle.
module tb_controller;
  import sim_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pul_down = 0;
  logic        clk100_90 = 0;
  int          trig_phase = 0, n_trig_wait = 0;
  logic [15:0] num_frames = 0;
  logic        busy, seq_done, mem_start;
  logic        word_valid = 0, word_last = 0;
  logic [PAGE_W-1:0] word_page = 0;
  logic [15:0] word_frame = 0;
  logic        rd_start, rd_busy = 0, rd_last, store_en, st_page;
  logic [PAGE_W-1:0] rd_page;
  logic        corr_start, corr_page, corr_done = 0;
  logic        sqrt_clr, sqrt_done = 0, has_prev = 0;
  logic        div_start, div_done = 0, result_valid;
  logic [15:0] result_frame;
  int checks = 0, failures = 0;

  controller dut (.*);

  localparam int WPF = 400;
  // trigger level: high 3 cycles out of 7
  always @(posedge clk) begin
    trig_phase <= (trig_phase + 1) % 7;
    clk100_90  <= (trig_phase >= 4);
  end
  int cycle = 0;
  always @(posedge clk) cycle++;

  // ---------------- unit models ----------------
  int rd_left = 0, corr_left = 0, sqrt_left = 0, div_left = 0, nroots = 0;
  int nfr_run = 0, wcnt = 0, fcnt = 0, ph = 0;
  assign rd_last = rd_busy && (rd_left == 1);
  always @(posedge clk) begin
    // read-out
    if (rst_n && rd_start && !rd_busy) begin rd_busy <= 1; rd_left <= 34; end
    else if (rd_left > 1) rd_left <= rd_left - 1;
    else if (rd_left == 1) begin rd_left <= 0; rd_busy <= 0; end
    // correlation -> root -> division
    corr_done <= 0; sqrt_done <= 0; div_done <= 0;
    if (rst_n && corr_start) corr_left <= 28;
    else if (corr_left > 1) corr_left <= corr_left - 1;
    else if (corr_left == 1) begin corr_left <= 0; corr_done <= 1; sqrt_left <= 16; end
    if (sqrt_left > 1) sqrt_left <= sqrt_left - 1;
    else if (sqrt_left == 1) begin
      sqrt_left <= 0; sqrt_done <= 1; nroots <= nroots + 1;
      has_prev <= (nroots + 1 >= 2);
    end
    if (sqrt_clr) begin nroots <= 0; has_prev <= 0; end
    if (rst_n && div_start) div_left <= 32;
    else if (div_left > 1) div_left <= div_left - 1;
    else if (div_left == 1) begin div_left <= 0; div_done <= 1; end
    // word stream
    word_valid <= 0; word_last <= 0;
    if (rst_n && mem_start) begin nfr_run <= int'(num_frames); wcnt <= 0; fcnt <= 0; ph <= 0; end
    else if (fcnt < nfr_run) begin
      ph <= 1 - ph;
      if (ph == 1) begin
        word_valid <= 1;
        word_last  <= (wcnt == WPF - 1);
        word_page  <= PAGE_W'(fcnt % 2);
        word_frame <= 16'(fcnt);
        if (wcnt == WPF - 1) begin wcnt <= 0; fcnt <= fcnt + 1; end
        else wcnt <= wcnt + 1;
      end
    end
  end

  // ---------------- monitors ----------------
  int n_rd = 0, n_mem = 0, n_div = 0, n_res = 0, n_seq = 0, n_corr = 0;
  int last_word_cycle = -100, last_word_page = 0, store_page = -1;
  always @(posedge clk) if (rst_n) begin
    if (word_valid && word_last) begin last_word_cycle = cycle; last_word_page = int'(word_page); end
    if (dut.fst == dut.F_TRIGGER) begin
      n_trig_wait++;
      checks++;
      if (rd_start) begin failures++; $display("erase before trigger"); end
    end
    if (mem_start) begin
      n_mem++;
      checks++;
      if (n_rd != 2) begin failures++; $display("memory started after %0d read-outs", n_rd); end
    end
    if (rd_start && !rd_busy) begin
      checks++;
      if (n_rd < 2) begin
        if (rd_page !== PAGE_W'(n_rd)) begin failures++; $display("erase page %0d", rd_page); end
      end else begin
        if (cycle - last_word_cycle != 2 || rd_page !== PAGE_W'(last_word_page)) begin
          failures++;
          $display("store read-out page %0d %0d cycles after last word", rd_page, cycle - last_word_cycle);
        end
        store_page = last_word_page;
      end
      n_rd++;
    end
    if (corr_start) begin
      n_corr++;
      checks += 2;
      if (int'(corr_page) != store_page) begin failures++; $display("correlation page %0d", corr_page); end
      if (!rd_last) begin failures++; $display("correlation not started on the last pair"); end
    end
    if (rd_busy && n_rd > 2) begin
      checks++;
      if (!store_en) begin failures++; $display("store not enabled during read-out"); end
    end
    if (div_start) n_div++;
    if (result_valid) begin
      checks++;
      if (int'(result_frame) != n_res + 1) begin failures++; $display("result frame %0d", result_frame); end
      n_res++;
    end
    if (seq_done) n_seq++;
  end

  task automatic run_seq(int nf);
    n_rd = 0; n_div = 0; n_res = 0; n_mem = 0; n_corr = 0;
    @(negedge clk); pul_down = 1; num_frames = 16'(nf);
    @(negedge clk); pul_down = 0;
    wait (seq_done);
    @(posedge clk); @(negedge clk);
    checks += 6;
    if (busy) begin failures++; $display("busy after seq_done"); end
    if (n_mem != 1) begin failures++; $display("memory started %0d times", n_mem); end
    if (n_rd != nf + 2) begin failures++; $display("%0d read-outs", n_rd); end
    if (n_corr != nf) begin failures++; $display("%0d correlations", n_corr); end
    if (n_div != nf - 1) begin failures++; $display("%0d divisions", n_div); end
    if (n_res != nf - 1) begin failures++; $display("%0d results", n_res); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    run_seq(5);
    run_seq(2);
    checks += 2;
    if (n_trig_wait == 0) begin failures++; $display("trigger wait never happened"); end
    if (n_seq != 2) begin failures++; $display("seq_done %0d times", n_seq); end
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
