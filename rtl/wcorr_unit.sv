// wcorr_unit: intermediate histogram store and windowed correlation.
//
// Store. The histogram arrives as 32 bin pairs {H[2k+1], H[2k]}. Two block
// memories (RAMBlock4/5, both written with the same data) keep it in one of
// two pages, realigned so that word k holds {H[2k], H[2k-1]} with H[-1] = 0:
// port A writes word k from the low half of pair k and the high half of
// pair k-1 (kept in a register), and port B writes word k+1 ahead of time
// with {0, H[2k+1]}, which leaves word 32 = {0, H[63]} after the last pair.
// With this layout the eight bins H[6g-1..6g+6] of window group g are the
// four words 3g..3g+3, read in one cycle on the four ports. A page is kept
// while the next frame is stored in the other page.
//
// Correlation. start (with cur_page) computes, for frame n in cur_page and
// frame n-1 in the other page,
//   sum_prev = sum_b H[n-1][b] * W[n][b]   and   sum_self = sum_b H[n][b] * W[n][b]
// where W is the three-bin windowed histogram. Each of the 11 window groups
// is read twice: first from the current page (windowed values are formed and
// held), then from the previous page (only the centre bins are taken), so a
// held W[n] meets H[n] in one cycle and H[n-1] in the next. Six multipliers,
// a three-level adder (6 -> 3 -> 2 -> 1) and two accumulators follow; a tag
// travelling with the data steers each sum to its accumulator. Products of
// bins 64 and 65 (the unused tail of group 10) are forced to zero.
//
// Timing: reads take 22 cycles, the pipeline after the memories has six
// register stages (pair sums, windowed values, products, two adder levels,
// accumulators). done pulses 28 cycles after the start cycle with both sums
// valid; self_done pulses one cycle earlier, when sum_self is final. Store
// and correlation must not overlap (an assertion checks it). Word layout,
// page use and the masking of the tail are this design's choices; the
// pipeline structure, the two-cycle hold of W and the cycle count follow
// the described circuit.
module wcorr_unit
  import sim_pkg::*;
#(
  parameter int unsigned ADDR_W = 9
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // store
  input  logic                   st_valid,
  input  logic [$clog2(NPAIRS)-1:0] st_idx,
  input  logic [2*HIST_W-1:0]    st_data,
  input  logic                   st_page,
  // correlation
  input  logic                   start,
  input  logic                   cur_page,
  output logic                   busy,
  output logic                   self_done,
  output logic                   done,
  output acc_t                   sum_prev,
  output acc_t                   sum_self
);
  localparam int unsigned WORD_W = ADDR_W - 1 - 2;  // page bit and two spare bits
  localparam int unsigned NREADS = 2 * NGROUPS;

  typedef logic [ADDR_W-1:0] addr_t;
  typedef struct packed {
    logic       v;
    logic       sel;   // 0: current frame n, 1: previous frame n-1
    logic [3:0] g;     // window group
    logic       last;
  } tag_t;

  function automatic addr_t mk_addr(input logic page, input int unsigned word);
    return {2'b00, page, WORD_W'(word)};
  endfunction

  // ---------------- store ----------------
  hist_t prev_hi;
  always_ff @(posedge clk) if (st_valid) prev_hi <= st_data[2*HIST_W-1:HIST_W];

  // ---------------- read scheduling ----------------
  logic       rd_run;
  logic [4:0] t;
  logic       sel_t;
  logic [3:0] g_t;
  logic       rpage;
  logic       cpage;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_run <= 1'b0;
      t      <= '0;
      cpage  <= 1'b0;
    end else if (start && !busy) begin
      rd_run <= 1'b1;
      t      <= '0;
      cpage  <= cur_page;
    end else if (rd_run) begin
      t <= t + 1'b1;
      if (t == 5'(NREADS-1)) rd_run <= 1'b0;
    end
  end

  assign sel_t = t[0];
  assign g_t   = t[4:1];
  assign rpage = sel_t ? ~cpage : cpage;

  addr_t a4a, a4b, a5a, a5b;
  logic  we_a, we_b;
  logic [31:0] din_a, din_b;
  logic [31:0] d4a, d4b, d5a, d5b;

  always_comb begin
    we_a  = st_valid;
    we_b  = st_valid;
    din_a = {st_data[HIST_W-1:0], (st_idx == '0) ? hist_t'(0) : prev_hi};
    din_b = {hist_t'(0), st_data[2*HIST_W-1:HIST_W]};
    if (st_valid) begin
      a4a = mk_addr(st_page, int'(st_idx));
      a4b = mk_addr(st_page, int'(st_idx) + 1);
    end else begin
      a4a = mk_addr(rpage, 3 * int'(g_t));
      a4b = mk_addr(rpage, 3 * int'(g_t) + 1);
    end
    a5a = st_valid ? a4a : mk_addr(rpage, 3 * int'(g_t) + 2);
    a5b = st_valid ? a4b : mk_addr(rpage, 3 * int'(g_t) + 3);
  end

  wbram #(.ADDR_W(ADDR_W), .DATA_W(32)) u_ram4 (
    .clk(clk), .addr_a(a4a), .we_a(we_a), .din_a(din_a), .dout_a(d4a),
    .addr_b(a4b), .we_b(we_b), .din_b(din_b), .dout_b(d4b));
  wbram #(.ADDR_W(ADDR_W), .DATA_W(32)) u_ram5 (
    .clk(clk), .addr_a(a5a), .we_a(we_a), .din_a(din_a), .dout_a(d5a),
    .addr_b(a5b), .we_b(we_b), .din_b(din_b), .dout_b(d5b));

  // ---------------- pipeline tags ----------------
  tag_t tg0, tg1, tg2, tg3, tg4, tg5;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      {tg0, tg1, tg2, tg3, tg4, tg5} <= '0;
    end else begin
      tg0 <= '{v: rd_run, sel: sel_t, g: g_t, last: (t == 5'(NREADS-1))};
      tg1 <= tg0;
      tg2 <= tg1;
      tg3 <= tg2;
      tg4 <= tg3;
      tg5 <= tg4;
    end
  end

  // P0 -> P1 -> P2: window adder (W held while the previous frame passes)
  hist_t h0 [WIN_IN];
  hist_t e2 [WIN_OUT];
  hist_t h2 [WIN_OUT];
  assign h0 = '{d4a[15:0], d4a[31:16], d4b[15:0], d4b[31:16],
                d5a[15:0], d5a[31:16], d5b[15:0], d5b[31:16]};

  window_adder u_win (
    .clk(clk), .h_in(h0), .w_load(tg1.v && !tg1.sel), .e_out(e2), .h_out(h2));

  // P3: six multipliers
  acc_t m3 [WIN_OUT];
  always_ff @(posedge clk)
    for (int k = 0; k < WIN_OUT; k++)
      m3[k] <= (int'(tg2.g) * WIN_OUT + k < NBINS) ? acc_t'(h2[k]) * acc_t'(e2[k]) : '0;

  // P4, P5: adder levels 6 -> 3 -> 2
  acc_t a4 [3];
  acc_t a5 [2];
  always_ff @(posedge clk) begin
    a4[0] <= m3[0] + m3[1];
    a4[1] <= m3[2] + m3[3];
    a4[2] <= m3[4] + m3[5];
    a5[0] <= a4[0] + a4[1];
    a5[1] <= a4[2];
  end

  // P6: last adder level and the two accumulators
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sum_prev  <= '0;
      sum_self  <= '0;
      self_done <= 1'b0;
      done      <= 1'b0;
    end else begin
      self_done <= tg5.v && !tg5.sel && (tg5.g == 4'(NGROUPS-1));
      done      <= tg5.v && tg5.last;
      if (start && !busy) begin
        sum_prev <= '0;
        sum_self <= '0;
      end else if (tg5.v) begin
        if (tg5.sel) sum_prev <= sum_prev + a5[0] + a5[1];
        else         sum_self <= sum_self + a5[0] + a5[1];
      end
    end
  end

  assign busy = rd_run | tg0.v | tg1.v | tg2.v | tg3.v | tg4.v | tg5.v;

  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
    st_valid |-> !rd_run);
endmodule
