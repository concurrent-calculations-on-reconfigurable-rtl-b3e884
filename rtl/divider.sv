// divider: normalized similarity by shift and subtract division.
//
// quot = floor(num * 2^(W-1) / den), an unsigned fixed-point value with one
// integer bit and W-1 fraction bits, so 1.0 is 2^(W-1). The quotient is
// built one bit per cycle by the restoring method: the partial remainder is
// shifted left with the next dividend bit, den is subtracted, and the sign of
// the difference chooses between keeping the difference (quotient bit 1) or
// the shifted remainder (quotient bit 0). The dividend num * 2^(W-1) is
// W+W-1 bits wide; when num < 2*den its upper quotient bits are all zero, so
// the remainder starts as num >> 1 and only W iterations are needed. When
// num >= 2*den (a ratio of 2 or more) or den = 0, quot saturates to all ones
// and ovf is set. A start pulse loads the operands; done pulses W cycles
// later (32 for the default) with quot valid. The shift-and-subtract method
// and the 32-cycle, 32-bit result follow the described design; the
// fixed-point format and the saturation are this design's choices.
module divider #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [W-1:0] num,
  input  logic [W-1:0] den,
  output logic         busy,
  output logic         done,
  output logic [W-1:0] quot,
  output logic         ovf
);
  localparam int unsigned CW = $clog2(W + 1);

  logic [W-1:0]  d;
  logic [W-1:0]  rem;
  logic          next_bit;    // num[0] on the first step, then zeros
  logic [CW-1:0] cnt;
  logic [W:0]    rem_sh;
  logic [W+1:0]  diff;
  logic          big;

  always_comb begin
    rem_sh = {rem, next_bit};
    diff   = {1'b0, rem_sh} - {2'b00, d};
    big    = ({1'b0, num} >= {den, 1'b0}) || (den == '0);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d        <= '0;
      rem      <= '0;
      next_bit <= 1'b0;
      cnt      <= '0;
      quot     <= '0;
      ovf      <= 1'b0;
      busy     <= 1'b0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        d        <= den;
        rem      <= {1'b0, num[W-1:1]};
        next_bit <= num[0];
        cnt      <= '0;
        quot     <= '0;
        ovf      <= big;
        busy     <= 1'b1;
      end else if (busy) begin
        next_bit <= 1'b0;
        if (diff[W+1]) begin
          rem  <= rem_sh[W-1:0];
          quot <= {quot[W-2:0], 1'b0};
        end else begin
          rem  <= diff[W-1:0];
          quot <= {quot[W-2:0], 1'b1};
        end
        cnt <= cnt + 1'b1;
        if (cnt == CW'(W-1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if (ovf) quot <= '1;
        end
      end
    end
  end
endmodule
