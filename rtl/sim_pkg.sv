// sim_pkg: constants shared by the frame-similarity engine.
//
// The numbers follow the described design: 64 luminance levels per
// histogram, 16-bit bin counters, a 32-bit external memory word carrying four
// 8-bit DC coefficients, 1600 coefficients (400 memory words) per frame, and
// 32-bit sums of products. The 4-bit page field of the histogram memories and
// the 1-bit page of the intermediate store are this design's choices.
package sim_pkg;
  localparam int unsigned NBINS     = 64;  // histogram levels
  localparam int unsigned BIN_W     = 6;   // log2(NBINS)
  localparam int unsigned HIST_W    = 16;  // one histogram counter
  localparam int unsigned PIX_W     = 8;   // one DC coefficient (luminance)
  localparam int unsigned BUS_W     = 32;  // external memory word
  localparam int unsigned LANES     = BUS_W / PIX_W;  // coefficients per word
  localparam int unsigned NPAIRS    = NBINS / 2;      // bin pairs on port B
  localparam int unsigned PAGE_W    = 4;   // page field of histogram RAM address
  localparam int unsigned ACC_W     = 32;  // sums of products
  localparam int unsigned ROOT_W    = ACC_W / 2;      // square root result
  localparam int unsigned WIN_OUT   = 6;   // windowed values per cycle
  localparam int unsigned WIN_IN    = 8;   // histogram values per cycle
  localparam int unsigned NGROUPS   = (NBINS + WIN_OUT - 1) / WIN_OUT;  // 11

  // Intermediate store word k holds {H[2k], H[2k-1]}, H[-1] = 0.
  typedef logic [HIST_W-1:0] hist_t;
  typedef logic [ACC_W-1:0]  acc_t;
endpackage
