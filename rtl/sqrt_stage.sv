// sqrt_stage: square root of the self-correlation and the denominator.
//
// The similarity of frames n-1 and n is
//   sum H[n-1]W[n] / ( sqrt(sum H[n-1]W[n-1]) * sqrt(sum H[n]W[n]) ).
// The second root of one frame pair is the first root of the next, so only
// one root is taken per frame: self_valid starts an isqrt of sum_self
// (sum H[n]W[n]); in the cycle after the root is found it is kept as Q(n),
// the old one moves to the Q(n-1) register, the denominator Q(n) * Q(n-1)
// is registered and done pulses. num_valid latches the
// numerator sum_prev (sum H[n-1]W[n]) so that it is held for the divider.
// has_prev is set once two roots have been taken, i.e. from the second frame
// on, when the denominator is meaningful.
//
// Timing: done follows self_valid by 16 cycles of root plus one of product.
// self_valid may come one cycle before num_valid (the correlation finishes
// its self sum first); start of the root then overlaps the last correlation
// cycle. The structure (root unit, register for the previous root,
// multiplier, numerator register) follows the described circuit; the
// handshake pulses are this design's choice.
module sqrt_stage
  import sim_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              self_valid,
  input  acc_t              sum_self,
  input  logic              num_valid,
  input  acc_t              sum_prev,
  input  logic              clr,        // forget the previous root (new sequence)
  output logic              busy,
  output logic              done,
  output logic              has_prev,
  output acc_t              numerator,
  output acc_t              denominator,
  output logic [ROOT_W-1:0] q_cur,
  output logic [ROOT_W-1:0] q_prev
);
  logic              r_busy, r_done;
  logic [ROOT_W-1:0] root;
  logic [1:0]        nroots;

  isqrt #(.W(ACC_W)) u_sqrt (
    .clk(clk), .rst_n(rst_n), .start(self_valid), .din(sum_self),
    .busy(r_busy), .done(r_done), .root(root));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q_cur       <= '0;
      q_prev      <= '0;
      numerator   <= '0;
      denominator <= '0;
      done        <= 1'b0;
      nroots      <= '0;
    end else begin
      done      <= 1'b0;
      if (num_valid) numerator <= sum_prev;
      if (clr) begin
        nroots <= '0;
      end else if (r_done) begin
        q_cur       <= root;
        q_prev      <= q_cur;
        denominator <= acc_t'(root) * acc_t'(q_cur);
        done        <= 1'b1;
        if (nroots != 2'd2) nroots <= nroots + 1'b1;
      end
    end
  end

  assign has_prev = (nroots == 2'd2);
  assign busy     = r_busy | r_done | self_valid;
endmodule
