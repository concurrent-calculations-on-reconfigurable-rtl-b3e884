// wbram: intermediate histogram store (RAMBlock4 and RAMBlock5).
//
// A true dual-port block memory, 512 words of 32 bits, each port able to read
// or write every cycle. Each word holds two 16-bit histogram values. Reads
// are synchronous and read-first: dout_* is the old content of the address
// presented at the previous clock edge. Size and port width follow the
// described design (9-bit addresses, 32-bit ports); read-first ordering is
// this design's choice. The two ports must not write the same word in the
// same cycle.
module wbram #(
  parameter int unsigned ADDR_W = 9,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr_a,
  input  logic              we_a,
  input  logic [DATA_W-1:0] din_a,
  output logic [DATA_W-1:0] dout_a,
  input  logic [ADDR_W-1:0] addr_b,
  input  logic              we_b,
  input  logic [DATA_W-1:0] din_b,
  output logic [DATA_W-1:0] dout_b
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    dout_a <= mem[addr_a];
    dout_b <= mem[addr_b];
    if (we_a) mem[addr_a] <= din_a;
    if (we_b) mem[addr_b] <= din_b;
  end
endmodule
