// hs_seeker: one head seeker of the HSn synchronisation-recovery scheme.
//
// Seeker INDEX of N owns the candidate header positions INDEX, INDEX+N,
// INDEX+2N, ... below 66 and tests one of them at a time against the
// header-legality vector sniffed from the gearbox window:
//   * illegal header (fail-fast): the valid-header counter is cleared, the
//     seeker gives up the position at once and moves to its next one, which
//     it tests on the very next clock against the same frame;
//   * legal header: the counter counts up and the seeker waits for the next
//     frame before testing the same position again;
//   * LOCK_HEADERS legal headers in a row: locked_o rises and stays high
//     while every later header at that position is legal. The first illegal
//     one drops the lock and starts the search again from the next position.
// The positions are visited in descending order (p, p-N, p-2N, ..., then
// wrapping to the highest position of the class), so that when bits are
// dropped from the stream the seeker that held the old lock reaches the new
// boundary after a number of steps that grows with the bits dropped.
//
// Interface: hdr_ok_i[p] says whether the header at position p of the
// current window is legal; new_frame_i marks the first cycle of a new window
// and window_valid_i that the window is filled. pos_o is the position under
// test (the locked position while locked_o is high) and moved_o pulses for
// each fail-fast move. One position is tested per clock; state is registered
// and reset synchronously to position INDEX with the counter cleared.
//
// The three rules and the lock length of 16 follow the scheme; the
// descending order and the start at position INDEX are this design's choices.
module hs_seeker
  import aurora_pkg::*;
#(
  parameter int unsigned N            = 8,
  parameter int unsigned INDEX        = 0,
  parameter int unsigned LOCK_HEADERS = aurora_pkg::LOCK_COUNT
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NPOS-1:0]  hdr_ok_i,
  input  logic             new_frame_i,
  input  logic             window_valid_i,
  output pos_t             pos_o,
  output logic             locked_o,
  output logic             moved_o
);

  localparam int unsigned CNT_W = $clog2(LOCK_HEADERS + 1);
  // Highest position owned by this seeker.
  localparam int unsigned LAST  = INDEX + N * ((NPOS - 1 - INDEX) / N);

  pos_t             pos_q;
  logic [CNT_W-1:0] cnt_q;
  logic             pending_q;  // the current frame still has to be tested
  logic             pending;
  logic             check;
  pos_t             pos_next;

  assign pending  = new_frame_i | pending_q;
  assign check    = window_valid_i & pending;
  assign pos_next = (pos_q >= pos_t'(N)) ? pos_q - pos_t'(N) : pos_t'(LAST);

  always_ff @(posedge clk) begin
    if (rst) begin
      pos_q     <= pos_t'(INDEX);
      cnt_q     <= '0;
      pending_q <= 1'b0;
    end else if (check) begin
      if (hdr_ok_i[pos_q]) begin
        if (cnt_q != CNT_W'(LOCK_HEADERS)) cnt_q <= cnt_q + 1'b1;
        pending_q <= 1'b0;
      end else begin
        cnt_q     <= '0;
        pos_q     <= pos_next;
        pending_q <= 1'b1;
      end
    end else begin
      pending_q <= 1'b0;
    end
  end

  assign pos_o    = pos_q;
  assign locked_o = (cnt_q == CNT_W'(LOCK_HEADERS));
  assign moved_o  = check & ~hdr_ok_i[pos_q];

  initial begin
    assert (INDEX < N && N >= 1 && N <= NPOS)
      else $error("hs_seeker: INDEX must be below N, and N within 1..66");
  end

endmodule
