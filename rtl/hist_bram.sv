// hist_bram: one histogram accumulator memory (RAMBlock0..3).
//
// A dual-port block memory seen as 1024 x 16 bits on port A and as 512 x 32
// bits on port B, both ports addressing the same storage. Port A serves the
// read-modify-write of single counters; port B reads two neighbouring
// counters at once (low half = even address, high half = odd address) and
// can write them in the same cycle, which the histogram unit uses to clear
// the counters while it reads them out. Both ports are synchronous and
// read-first: dout_* is the old content of the address presented at the
// previous clock edge. The asymmetric port widths follow the described
// design; read-first ordering is this design's choice. Ports A and B must
// not write the same word in the same cycle.
module hist_bram #(
  parameter int unsigned A_ADDR_W = 10,
  parameter int unsigned A_DATA_W = 16
) (
  input  logic                    clk,
  // port A: single counter
  input  logic [A_ADDR_W-1:0]     addr_a,
  input  logic                    we_a,
  input  logic [A_DATA_W-1:0]     din_a,
  output logic [A_DATA_W-1:0]     dout_a,
  // port B: counter pair
  input  logic [A_ADDR_W-2:0]     addr_b,
  input  logic                    we_b,
  input  logic [2*A_DATA_W-1:0]   din_b,
  output logic [2*A_DATA_W-1:0]   dout_b
);
  logic [A_DATA_W-1:0] mem [2**A_ADDR_W];

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= {mem[{addr_b, 1'b1}], mem[{addr_b, 1'b0}]};
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) begin
      mem[{addr_b, 1'b0}] <= din_b[A_DATA_W-1:0];
      mem[{addr_b, 1'b1}] <= din_b[2*A_DATA_W-1:A_DATA_W];
    end
  end
endmodule
