// window_adder: six windowed histogram values per cycle from eight bins.
//
// Windowing replaces every bin by the sum of itself and its two neighbours,
// E[b] = H[b-1] + H[b] + H[b+1]. Given eight consecutive bins h[0..7]
// (H[6g-1] .. H[6g+6]) the unit produces E[6g] .. E[6g+5]. Neighbouring
// windows share a pair sum: h1+h2 serves E[6g] and E[6g+1], h3+h4 serves
// E[6g+2] and E[6g+3], h5+h6 serves E[6g+4] and E[6g+5], so nine adders do
// the work of twelve.
//
// Two register stages, as in the described pipeline: stage 1 holds the eight
// inputs and the three pair sums, stage 2 holds the six windowed values and
// the six centre bins h[1..6] (the H[b] that pair with E[b] in the
// correlation). w_load gates stage 2's windowed register: when it is low the
// windowed values of the previous load are kept while the centre bins still
// advance. This is the register that holds W of the current frame for two
// cycles while it meets the current and the previous histogram. Latency is
// two cycles from h_in to e_out/h_out; w_load is sampled one cycle after its
// h_in. Sums are 16 bits: the windowed value of a histogram whose total is
// below 2^16 cannot exceed that total.
module window_adder
  import sim_pkg::*;
(
  input  logic  clk,
  input  hist_t h_in  [WIN_IN],
  input  logic  w_load,
  output hist_t e_out [WIN_OUT],
  output hist_t h_out [WIN_OUT]
);
  hist_t h1 [WIN_IN];
  hist_t ps [3];

  always_ff @(posedge clk) begin
    h1    <= h_in;
    ps[0] <= h_in[1] + h_in[2];
    ps[1] <= h_in[3] + h_in[4];
    ps[2] <= h_in[5] + h_in[6];
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < WIN_OUT; k++) h_out[k] <= h1[k+1];
    if (w_load) begin
      e_out[0] <= h1[0] + ps[0];
      e_out[1] <= ps[0] + h1[3];
      e_out[2] <= h1[2] + ps[1];
      e_out[3] <= ps[1] + h1[5];
      e_out[4] <= h1[4] + ps[2];
      e_out[5] <= ps[2] + h1[7];
    end
  end
endmodule
