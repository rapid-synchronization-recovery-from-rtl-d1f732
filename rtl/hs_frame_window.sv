// hs_frame_window: the window the header seekers sniff.
//
// Keeps the two most recent gearbox frames side by side, {previous, current},
// 132 bits with bit 131 the earliest on the line. A block that starts p bits
// after the previous frame's boundary (position p, 0..65) lies wholly inside
// this window, so the legality of the header at every one of the 66 positions
// can be read at once: hdr_ok_o[p] is high when window bits 131-p and 130-p
// differ. This is what lets a seeker test a new candidate position on every
// clock cycle rather than once per frame.
//
// Interface: frame_i/frame_valid_i come from the gearbox. The window and
// hdr_ok_o change one cycle after a frame arrives; new_frame_o is high for
// exactly that first cycle. valid_o goes high once two frames have been seen
// since reset and stays high. Sniffing the gearbox contents follows the
// scheme; keeping exactly one previous frame is this design's choice.
module hs_frame_window
  import aurora_pkg::*;
(
  input  logic                  clk,
  input  logic                  rst,
  input  block_t                frame_i,
  input  logic                  frame_valid_i,
  output logic [2*BLOCK_W-1:0]  window_o,
  output logic [NPOS-1:0]       hdr_ok_o,
  output logic                  new_frame_o,
  output logic                  valid_o
);

  logic [1:0] seen_q;   // frames seen since reset, saturating at 2

  always_ff @(posedge clk) begin
    if (rst) begin
      window_o    <= '0;
      new_frame_o <= 1'b0;
      seen_q      <= '0;
    end else begin
      new_frame_o <= frame_valid_i;
      if (frame_valid_i) begin
        window_o <= {window_o[BLOCK_W-1:0], frame_i};
        if (seen_q != 2'd2) seen_q <= seen_q + 2'd1;
      end
    end
  end

  assign valid_o = (seen_q == 2'd2);

  always_comb begin
    for (int p = 0; p < NPOS; p++)
      hdr_ok_o[p] = header_legal(window_o[2*BLOCK_W-1-p -: 2]);
  end

endmodule
