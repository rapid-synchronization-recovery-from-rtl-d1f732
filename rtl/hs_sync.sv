// hs_sync: HSn synchronisation recovery, N head seekers and the winner rules.
//
// N copies of hs_seeker share the 66 candidate header positions, seeker i
// taking positions i, i+N, i+2N, ... Each tests one position per clock
// against the legality vector sniffed from the gearbox window. Several
// seekers can be locked at once (a scrambled payload bit pair at a wrong
// position passes 16 headers in a row about once in 65k blocks), so a
// winner is kept:
//   1. a winner stays the winner until its own seeker sees an illegal
//      header and drops its lock;
//   2. when there is no winner, the lowest-numbered locked seeker, found by
//      the hs_select_tree binary tree, becomes the winner.
//
// Interface: hdr_ok_i, new_frame_i and window_valid_i come from
// hs_frame_window. lock_valid_o, lock_pos_o and winner_o are combinational
// from registered state and reflect every header test made up to the
// previous clock edge; the winner index is registered. seeker_locked_o,
// seeker_pos_o and seeker_moved_o expose each seeker for monitoring.
//
// The seekers, their position classes and the two winner rules follow the
// scheme; N = 8 is its recommended configuration.
module hs_sync
  import aurora_pkg::*;
#(
  parameter int unsigned N            = 8,
  parameter int unsigned LOCK_HEADERS = aurora_pkg::LOCK_COUNT,
  localparam int unsigned IDX_W       = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [NPOS-1:0]  hdr_ok_i,
  input  logic             new_frame_i,
  input  logic             window_valid_i,
  output logic             lock_valid_o,
  output pos_t             lock_pos_o,
  output logic [IDX_W-1:0] winner_o,
  output logic [N-1:0]     seeker_locked_o,
  output pos_t [N-1:0]     seeker_pos_o,
  output logic [N-1:0]     seeker_moved_o
);

  for (genvar i = 0; i < N; i++) begin : g_seek
    hs_seeker #(.N(N), .INDEX(i), .LOCK_HEADERS(LOCK_HEADERS)) u_seeker (
      .clk            (clk),
      .rst            (rst),
      .hdr_ok_i       (hdr_ok_i),
      .new_frame_i    (new_frame_i),
      .window_valid_i (window_valid_i),
      .pos_o          (seeker_pos_o[i]),
      .locked_o       (seeker_locked_o[i]),
      .moved_o        (seeker_moved_o[i])
    );
  end

  logic             tree_any;
  logic [IDX_W-1:0] tree_idx;

  hs_select_tree #(.N(N), .IDX_W(IDX_W)) u_tree (
    .locked_i (seeker_locked_o),
    .any_o    (tree_any),
    .idx_o    (tree_idx)
  );

  logic             win_valid_q;
  logic [IDX_W-1:0] win_idx_q;
  logic             keep;

  assign keep         = win_valid_q & seeker_locked_o[win_idx_q];
  assign winner_o     = keep ? win_idx_q : tree_idx;
  assign lock_valid_o = keep | tree_any;
  assign lock_pos_o   = seeker_pos_o[winner_o];

  always_ff @(posedge clk) begin
    if (rst) begin
      win_valid_q <= 1'b0;
      win_idx_q   <= '0;
    end else begin
      win_valid_q <= lock_valid_o;
      win_idx_q   <= winner_o;
    end
  end

endmodule
