// tb_window_adder: random groups of eight bins are fed every cycle; two
// cycles later the six windowed values E[k] = h[k] + h[k+1] + h[k+2] and the
// centre bins h[k+1] must appear. With w_load low the windowed outputs must
// keep their previous values while the centre bins advance.
module tb_window_adder;
  import sim_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  hist_t h_in [WIN_IN];
  hist_t e_out [WIN_OUT];
  hist_t h_out [WIN_OUT];
  logic  w_load;
  int checks = 0, failures = 0;

  window_adder dut (.*);

  localparam int NC = 400;
  hist_t hist_h [NC][WIN_IN];
  logic  load_h [NC];
  hist_t e_exp [WIN_OUT];
  int n_hold = 0;

  initial begin
    foreach (h_in[i]) h_in[i] = 0;
    w_load = 1;
    for (int c = 0; c < NC; c++) begin
      @(negedge clk);
      // outputs now belong to the entry driven two cycles ago
      if (c >= 2) begin
        if (load_h[c-2]) for (int k = 0; k < WIN_OUT; k++)
          e_exp[k] = hist_h[c-2][k] + hist_h[c-2][k+1] + hist_h[c-2][k+2];
        else n_hold++;
        for (int k = 0; k < WIN_OUT; k++) begin
          checks += 2;
          if (e_out[k] !== e_exp[k]) begin
            failures++; $display("cycle %0d E[%0d] %0d expected %0d", c, k, e_out[k], e_exp[k]);
          end
          if (h_out[k] !== hist_h[c-2][k+1]) begin
            failures++; $display("cycle %0d H[%0d] %0d expected %0d", c, k, h_out[k], hist_h[c-2][k+1]);
          end
        end
      end
      for (int i = 0; i < WIN_IN; i++) hist_h[c][i] = hist_t'($urandom_range(c < 200 ? 500 : 20000));
      h_in = hist_h[c];
      load_h[c] = ($urandom_range(2) != 0) || c < 4;
      // w_load is sampled one cycle after its data
      w_load = (c >= 1) ? load_h[c-1] : 1'b1;
    end
    checks++;
    if (n_hold == 0) begin failures++; $display("hold never exercised"); end
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
