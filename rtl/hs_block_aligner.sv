// hs_block_aligner: cuts the true 66-bit block out of the sniffing window.
//
// Once the HSn unit reports a locked position p, the block that starts p
// bits into the {previous, current} frame window is the block the
// transmitter sent: window bits 131-p down to 66-p. The aligner takes it
// one cycle after each new frame, when the seekers have tested that frame's
// header, so a block is only passed on if the winning seeker is still locked
// after seeing it. It also flags whether the block directly continues the
// previously passed block at the same position (restart_o low) or starts a
// new run after a loss of lock or a change of position (restart_o high),
// which the descrambler needs to know.
//
// Interface: window_i/new_frame_i from hs_frame_window, lock_valid_i and
// lock_pos_i from hs_sync. block_o, restart_o are valid in the cycle
// block_valid_o is high, two clocks after the new_frame_i pulse of the
// window that holds the block. The gearbox never delivers frames on two consecutive
// cycles, so the window is still the one the seekers tested. Extracting by
// position follows the scheme; the restart flag is this design's choice.
module hs_block_aligner
  import aurora_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst,
  input  logic [2*BLOCK_W-1:0] window_i,
  input  logic                 new_frame_i,
  input  logic                 lock_valid_i,
  input  pos_t                 lock_pos_i,
  output block_t               block_o,
  output logic                 block_valid_o,
  output logic                 restart_o
);

  logic nf_d_q;       // the seekers have just tested the current window
  logic run_q;        // the last tested frame produced a block
  pos_t run_pos_q;    // ... at this position
  logic take;

  assign take = nf_d_q & lock_valid_i;

  always_ff @(posedge clk) begin
    if (rst) begin
      nf_d_q        <= 1'b0;
      run_q         <= 1'b0;
      run_pos_q     <= '0;
      block_o       <= '0;
      block_valid_o <= 1'b0;
      restart_o     <= 1'b0;
    end else begin
      nf_d_q        <= new_frame_i;
      block_valid_o <= take;
      if (nf_d_q) begin
        run_q     <= lock_valid_i;
        run_pos_q <= lock_pos_i;
      end
      if (take) begin
        block_o   <= window_i[2*BLOCK_W-1 - int'(lock_pos_i) -: BLOCK_W];
        restart_o <= ~run_q | (run_pos_q != lock_pos_i);
      end
    end
  end

  assert property (@(posedge clk) disable iff (rst) new_frame_i |-> ~nf_d_q)
    else $error("frames arrived on consecutive cycles");
  assert property (@(posedge clk) disable iff (rst) lock_valid_i |-> lock_pos_i < pos_t'(NPOS))
    else $error("lock position out of range");

endmodule
