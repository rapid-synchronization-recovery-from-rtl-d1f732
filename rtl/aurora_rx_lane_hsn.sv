// aurora_rx_lane_hsn: Aurora-style 64b/66b receive lane with HSn rapid
// synchronisation recovery.
//
// A radiation-induced glitch on the receive clock can add or drop bits, and
// the true block boundary then moves to one of the other 65 bit positions.
// This lane finds it again quickly: the 32-bit words from the deserializer
// go through a 32b->66b gearbox whose frames are kept, two at a time, in a
// window; N head seekers sniff that window and each tests one candidate
// header position per clock (positions i, i+N, i+2N, ... for seeker i),
// leaving a position on its first illegal header and declaring it locked
// after 16 legal headers in a row. The winning locked position cuts the true
// block out of the window, and the payload is descrambled.
//
//   word_i --> gearbox_32b66b --> hs_frame_window --+--> hs_block_aligner
//                                     hdr_ok        |           |
//                                       v           |   descrambler_64b66b
//                                    hs_sync -------+           |
//                                (N x hs_seeker,         header_o/data_o
//                                 hs_select_tree)
//
// Interface: word_i (word_i[31] first on the line) with word_valid_i, one
// word every four clocks when fed by a 1:8 DDR deserializer. data_valid_o
// marks each descrambled block (header_o, data_o[63] first on the line),
// about every 8.25 clocks when locked; the first block after a new lock only
// primes the descrambler and is not marked valid. locked_o/lock_pos_o give
// the winning position, winner_o the winning seeker, seeker_locked_o the
// lock flag of every seeker and seeker_moved_o its fail-fast moves. From the
// clock in which the gearbox puts out the frame that completes a block to
// data_valid_o for that block is four clocks. The seeker count N defaults to
// 8, the configuration the scheme recommends; the deserializer itself is
// outside this module.
module aurora_rx_lane_hsn
  import aurora_pkg::*;
#(
  parameter int unsigned N            = 8,
  parameter int unsigned LOCK_HEADERS = aurora_pkg::LOCK_COUNT
) (
  input  logic               clk,
  input  logic               rst,
  input  logic [WORD_W-1:0]  word_i,
  input  logic               word_valid_i,
  output logic [1:0]         header_o,
  output payload_t           data_o,
  output logic               data_valid_o,
  output logic               locked_o,
  output pos_t               lock_pos_o,
  output logic [(N > 1 ? $clog2(N) : 1)-1:0] winner_o,
  output logic [N-1:0]       seeker_locked_o,
  output logic [N-1:0]       seeker_moved_o
);

  block_t                frame;
  logic                  frame_valid;
  logic [2*BLOCK_W-1:0]  window;
  logic [NPOS-1:0]       hdr_ok;
  logic                  new_frame;
  logic                  window_valid;
  pos_t [N-1:0]          seeker_pos;
  block_t                block;
  logic                  block_valid;
  logic                  restart;

  gearbox_32b66b u_gearbox (
    .clk, .rst,
    .word_i, .word_valid_i,
    .frame_o       (frame),
    .frame_valid_o (frame_valid)
  );

  hs_frame_window u_window (
    .clk, .rst,
    .frame_i       (frame),
    .frame_valid_i (frame_valid),
    .window_o      (window),
    .hdr_ok_o      (hdr_ok),
    .new_frame_o   (new_frame),
    .valid_o       (window_valid)
  );

  hs_sync #(.N(N), .LOCK_HEADERS(LOCK_HEADERS)) u_sync (
    .clk, .rst,
    .hdr_ok_i        (hdr_ok),
    .new_frame_i     (new_frame),
    .window_valid_i  (window_valid),
    .lock_valid_o    (locked_o),
    .lock_pos_o      (lock_pos_o),
    .winner_o        (winner_o),
    .seeker_locked_o (seeker_locked_o),
    .seeker_pos_o    (seeker_pos),
    .seeker_moved_o  (seeker_moved_o)
  );

  hs_block_aligner u_aligner (
    .clk, .rst,
    .window_i      (window),
    .new_frame_i   (new_frame),
    .lock_valid_i  (locked_o),
    .lock_pos_i    (lock_pos_o),
    .block_o       (block),
    .block_valid_o (block_valid),
    .restart_o     (restart)
  );

  descrambler_64b66b u_descrambler (
    .clk, .rst,
    .block_i   (block),
    .valid_i   (block_valid),
    .restart_i (restart),
    .header_o  (header_o),
    .data_o    (data_o),
    .valid_o   (data_valid_o)
  );

endmodule
