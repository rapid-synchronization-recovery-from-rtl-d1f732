// gearbox_32b66b: turns the deserializer's 32-bit words into 66-bit frames.
//
// Incoming words are appended behind the bits already held in a 128-bit
// buffer; whenever at least 66 bits are held, the oldest 66 leave as one
// frame and the rest move up by a combinational shifter. Since a frame takes
// 66 = 2*32 + 2 bits, the word boundary moves two bit positions for every
// frame, and 33 words make 16 frames. The frames are cut at the gearbox's
// own boundary, which need not be the true block boundary: the header
// seekers downstream find the true one, and the gearbox itself never slips.
//
// Interface: word_i (word_i[31] is the first bit on the line) is taken when
// word_valid_i is high. frame_o (frame_o[65] first on the line) is valid for
// the single cycle in which frame_valid_o is high, one cycle after the bits
// that complete it arrive. With one word every four cycles, as a 1:8 DDR
// deserializer at the internal clock delivers, a frame leaves every 8 or 9
// cycles. Reset is synchronous and empties the buffer.
//
// The 32-bit word, the 128-bit buffer and the two-position step per frame
// follow the receive lane being improved; the fill counter is this design's
// way of tracking the shifter position.
module gearbox_32b66b
  import aurora_pkg::*;
(
  input  logic                clk,
  input  logic                rst,
  input  logic [WORD_W-1:0]   word_i,
  input  logic                word_valid_i,
  output block_t              frame_o,
  output logic                frame_valid_o
);

  localparam int unsigned BUF_W = 128;

  logic [BUF_W-1:0] buf_q, buf_d;
  logic [7:0]       fill_q, fill_d;   // valid bits held, left-aligned in buf_q
  logic             emit;

  assign emit = (fill_q >= 8'(BLOCK_W));

  always_comb begin
    buf_d  = buf_q;
    fill_d = fill_q;
    if (emit) begin
      buf_d  = buf_q << BLOCK_W;
      fill_d = fill_q - 8'(BLOCK_W);
    end
    if (word_valid_i) begin
      buf_d  = buf_d | ({word_i, {(BUF_W-WORD_W){1'b0}}} >> fill_d);
      fill_d = fill_d + 8'(WORD_W);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_q         <= '0;
      fill_q        <= '0;
      frame_o       <= '0;
      frame_valid_o <= 1'b0;
    end else begin
      buf_q         <= buf_d;
      fill_q        <= fill_d;
      frame_valid_o <= emit;
      if (emit) frame_o <= buf_q[BUF_W-1 -: BLOCK_W];
    end
  end

  // The buffer never holds more than 65 + 32 bits.
  assert property (@(posedge clk) disable iff (rst) fill_q <= 8'(BLOCK_W - 1 + WORD_W))
    else $error("gearbox buffer overfilled");

endmodule
