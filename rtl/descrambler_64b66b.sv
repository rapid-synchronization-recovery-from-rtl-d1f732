// descrambler_64b66b: self-synchronising descrambler for 64b/66b payloads.
//
// The transmitter scrambles the 64 payload bits of every block with the
// polynomial 1 + x^39 + x^58 and leaves the 2-bit header clear. Each
// received payload bit is recovered as d(n) = s(n) ^ s(n-39) ^ s(n-58),
// where s is the received scrambled stream, so the descrambler only keeps
// the last 58 scrambled bits and needs no seed. All 64 bits of a block are
// done in parallel in one cycle, bit 63 of the payload being the first on
// the line.
//
// Interface: block_i is taken when valid_i is high. With restart_i high the
// block does not follow the previous one on the line (after a lock change),
// so its payload only loads the history and valid_o stays low for it.
// header_o/data_o/valid_o appear one clock after the block. Reset clears the
// history. The scrambled payload and clear header follow the lane format;
// the polynomial is the standard one of the 64b/66b line code, and dropping
// the first block of a new run is this design's choice.
module descrambler_64b66b
  import aurora_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  block_t         block_i,
  input  logic           valid_i,
  input  logic           restart_i,
  output logic [1:0]     header_o,
  output payload_t       data_o,
  output logic           valid_o
);

  localparam int unsigned TAP_A = 39;
  localparam int unsigned TAP_B = 58;

  // hist_q[k] is the scrambled bit received k+1 bits ago.
  logic [TAP_B-1:0] hist_q;
  // ext[k] is the scrambled bit received k bits before the block's last bit.
  logic [TAP_B+PAYLOAD_W-1:0] ext;
  payload_t plain;

  always_comb begin
    // Newest bits at the low end: the last payload bit (block_i[0]) is ext[0].
    ext = {hist_q[TAP_B-1:0], block_i[PAYLOAD_W-1:0]};
    for (int k = 0; k < PAYLOAD_W; k++)
      plain[k] = ext[k] ^ ext[k + TAP_A] ^ ext[k + TAP_B];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      hist_q   <= '0;
      header_o <= '0;
      data_o   <= '0;
      valid_o  <= 1'b0;
    end else begin
      valid_o <= valid_i & ~restart_i;
      if (valid_i) begin
        hist_q   <= block_i[TAP_B-1:0];
        header_o <= block_i[BLOCK_W-1 -: 2];
        data_o   <= plain;
      end
    end
  end

endmodule
