// controller: sequencing of the frame-similarity engine.
//
// Two cooperating state machines.
//
// Front machine (frames): WAIT until the start pulse pul_down; TRIGGER
// waits until the level clk100_90 is high (sampled on clk); ERASE clears
// both histogram pages through the read-and-clear port (two read-outs of 32
// bin pairs, 64 cycles); FRAMES starts the external memory interface, which
// then streams num_frames frames without a gap, and waits until the back
// machine has finished the last frame. Two cycles after the last word of
// each frame has entered the histogram unit (its last counter update is
// then written) the frame is handed to the back machine.
//
// Back machine (one frame): STORE reads out and clears the frame's
// histogram page into the intermediate store (32 pairs); WINDOWED runs the
// windowed correlation, started in the cycle the last pair is stored; the square root is started by the correlation's
// self_done directly, one cycle before the correlation ends; ROOT waits for
// the denominator and starts the division in the cycle it arrives; DIVIDE
// waits for the division, whose done is the result of the frame pair
// (n-1, n). The first frame of a sequence has no predecessor:
// its root is kept and no division is run. The back machine takes 115
// cycles from the last word of a frame to its result and must be idle when the next frame is handed over,
// which the 800-cycle frame time guarantees; an assertion checks it.
//
// The division of the work into a histogram stage working on alternate
// pages and a back end that runs once per frame, the wait and trigger
// conditions (pul_down, clk100_90), the erase phase and the special first
// frame follow the described control; the states, their
// encoding and the handshakes are this design's choices.
module controller
  import sim_pkg::*;
#(
  parameter int unsigned FRAME_W = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pul_down,
  input  logic               clk100_90,   // trigger level (synchronous)
  input  logic [FRAME_W-1:0] num_frames,
  output logic               busy,
  output logic               seq_done,    // pulse: all frames finished
  // external memory interface
  output logic               mem_start,
  input  logic               word_valid,
  input  logic               word_last,
  input  logic [PAGE_W-1:0]  word_page,
  input  logic [FRAME_W-1:0] word_frame,
  // histogram unit read-out
  output logic               rd_start,
  output logic [PAGE_W-1:0]  rd_page,
  input  logic               rd_busy,
  input  logic               rd_last,     // last pair of a read-out is valid
  output logic               store_en,    // read-out feeds the intermediate store
  output logic               st_page,
  // windowed correlation
  output logic               corr_start,
  output logic               corr_page,
  input  logic               corr_done,
  // root and product
  output logic               sqrt_clr,
  input  logic               sqrt_done,
  input  logic               has_prev,
  // division
  output logic               div_start,
  input  logic               div_done,
  output logic               result_valid,
  output logic [FRAME_W-1:0] result_frame  // n of the pair (n-1, n)
);
  typedef enum logic [2:0] {F_WAIT, F_TRIGGER, F_ERASE0, F_ERASE1, F_FRAMES} fstate_t;
  typedef enum logic [2:0] {B_IDLE, B_STORE, B_WINDOWED, B_ROOT, B_DIVIDE} bstate_t;

  fstate_t fst;
  bstate_t bst;
  logic [FRAME_W-1:0] nfr, frames_done;
  logic               hand1, hand2;       // delayed last-word marks
  logic [PAGE_W-1:0]  hpage1, hpage2;
  logic [FRAME_W-1:0] hframe1, hframe2, bframe;
  logic               erase_go, store_go;
  logic               rd_started;

  // ---------------- front machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fst        <= F_WAIT;
      nfr        <= '0;
      mem_start  <= 1'b0;
      rd_started <= 1'b0;
    end else begin
      mem_start <= 1'b0;
      case (fst)
        F_WAIT:
          if (pul_down && num_frames != '0) begin
            nfr        <= num_frames;
            fst        <= F_TRIGGER;
            rd_started <= 1'b0;
          end
        F_TRIGGER:
          if (clk100_90) fst <= F_ERASE0;
        F_ERASE0, F_ERASE1:
          if (!rd_started) rd_started <= 1'b1;
          else if (!rd_busy) begin
            rd_started <= 1'b0;
            if (fst == F_ERASE0) fst <= F_ERASE1;
            else begin
              fst       <= F_FRAMES;
              mem_start <= 1'b1;
            end
          end
        F_FRAMES:
          if (frames_done == nfr && bst == B_IDLE) fst <= F_WAIT;
        default: fst <= F_WAIT;
      endcase
    end
  end

  assign erase_go = (fst == F_ERASE0 || fst == F_ERASE1) && !rd_started;
  assign busy     = (fst != F_WAIT);
  assign seq_done = (fst == F_FRAMES) && (frames_done == nfr) && (bst == B_IDLE);
  assign sqrt_clr = (fst == F_WAIT) && pul_down;

  // last word of a frame: hand over two cycles later
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hand1 <= 1'b0;
      hand2 <= 1'b0;
    end else begin
      hand1 <= word_valid && word_last;
      hand2 <= hand1;
    end
  end
  always_ff @(posedge clk) begin
    hpage1  <= word_page;
    hpage2  <= hpage1;
    hframe1 <= word_frame;
    hframe2 <= hframe1;
  end
  assign store_go = hand2;

  // ---------------- back machine ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bst          <= B_IDLE;
      st_page      <= 1'b0;
      bframe       <= '0;
      frames_done  <= '0;
    end else begin
      if (fst == F_WAIT && pul_down) frames_done <= '0;
      case (bst)
        B_IDLE:
          if (store_go) begin
            bst     <= B_STORE;
            st_page <= hpage2[0];
            bframe  <= hframe2;
          end
        B_STORE:
          if (rd_last) bst <= B_WINDOWED;
        B_WINDOWED:
          if (corr_done) bst <= B_ROOT;
        B_ROOT:
          if (sqrt_done) begin
            if (has_prev) begin
              bst <= B_DIVIDE;
            end else begin
              bst         <= B_IDLE;
              frames_done <= frames_done + 1'b1;
            end
          end
        B_DIVIDE:
          if (div_done) begin
            bst         <= B_IDLE;
            frames_done <= frames_done + 1'b1;
          end
        default: bst <= B_IDLE;
      endcase
    end
  end

  // read-out requests: erase (front) or store (back)
  always_comb begin
    rd_start = erase_go || (bst == B_IDLE && store_go);
    rd_page  = erase_go ? ((fst == F_ERASE1) ? PAGE_W'(1) : PAGE_W'(0)) : hpage2;
  end
  // start pulses and the result strobe follow the events without a register
  assign corr_start   = (bst == B_STORE) && rd_last;
  assign div_start    = (bst == B_ROOT) && sqrt_done && has_prev;
  assign result_valid = (bst == B_DIVIDE) && div_done;
  assign result_frame = bframe;
  assign store_en     = (bst == B_STORE);
  assign corr_page    = st_page;

  a_backend_free: assert property (@(posedge clk) disable iff (!rst_n)
    store_go |-> (bst == B_IDLE));
endmodule
