// ext_sram: behavioural model of the board's external static RAM
// (256K x 32 bits, asynchronous read) for the testbenches.
//
// Reading is combinational: rdata follows addr whenever oe is high (zero
// otherwise), standing in for a 10 ns part sampled two fast clock cycles
// after the address changes. A synchronous write port lets a testbench load
// frames. Not synthesizable intent; only for simulation.
module ext_sram #(
  parameter int unsigned ADDR_W = 18,
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic [ADDR_W-1:0] addr,
  input  logic              oe,
  output logic [DATA_W-1:0] rdata,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata
);
  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) if (we) mem[waddr] <= wdata;
  assign rdata = oe ? mem[addr] : '0;
endmodule
