// isqrt: integer square root by shift and subtract, one result bit per cycle.
//
// root = floor(sqrt(din)) for a W-bit unsigned input, W/2 result bits.
// Each cycle two more input bits are shifted into the partial remainder and
// the trial value {root, 01} is subtracted; the sign of the difference
// decides whether the difference is kept and whether the new root bit is 1
// (the restoring method). A start pulse loads din; done pulses after W/2
// cycles (16 for the 32-bit default) with root valid, and root holds until
// the next start. start is ignored while busy. The method and the 16-cycle
// count follow the described design; the handshake is this design's choice.
module isqrt #(
  parameter int unsigned W = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [W-1:0]   din,
  output logic           busy,
  output logic           done,
  output logic [W/2-1:0] root
);
  localparam int unsigned RW = W / 2;
  localparam int unsigned CW = $clog2(RW + 1);

  logic [W-1:0]   x;      // input bits not yet consumed, MSBs first
  logic [RW:0]    rem;    // partial remainder, at most 2*root
  logic [CW-1:0]  cnt;
  logic [RW+2:0]  rem_sh, trial;
  logic [RW+3:0]  diff;   // one extra bit: its MSB is the sign

  always_comb begin
    rem_sh = {rem, x[W-1 -: 2]};
    trial  = {1'b0, root, 2'b01};
    diff   = {1'b0, rem_sh} - {1'b0, trial};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x    <= '0;
      rem  <= '0;
      root <= '0;
      cnt  <= '0;
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        x    <= din;
        rem  <= '0;
        root <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        x <= {x[W-3:0], 2'b00};
        if (diff[RW+3]) begin            // negative: restore
          rem  <= rem_sh[RW:0];
          root <= {root[RW-2:0], 1'b0};
        end else begin
          rem  <= diff[RW:0];
          root <= {root[RW-2:0], 1'b1};
        end
        cnt <= cnt + 1'b1;
        if (cnt == CW'(RW-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end
endmodule
