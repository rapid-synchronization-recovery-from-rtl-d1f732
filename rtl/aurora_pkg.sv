// aurora_pkg: constants and types shared by the Aurora 64b/66b receive lane
// with HSn header-seeker synchronisation recovery.
//
// A 66-bit block is a 2-bit sync header followed by 64 scrambled payload
// bits. Throughout this design a block is held as block[65:0] with block[65]
// the first bit on the line: block[65:64] is the header and block[63] the
// first payload bit. A header is legal when its two bits differ (01 for a
// data block, 10 for a control block); 00 and 11 never occur at the true
// block boundary. The number of legal headers in a row that declares a
// position locked (16) is the value the scheme is built around; the
// 32-bit deserializer word and the 66 candidate positions follow from the
// lane format.
package aurora_pkg;

  localparam int unsigned BLOCK_W   = 66;   // bits per 64b/66b block
  localparam int unsigned PAYLOAD_W = 64;   // scrambled payload bits
  localparam int unsigned WORD_W    = 32;   // deserializer word width
  localparam int unsigned NPOS      = 66;   // candidate header positions
  localparam int unsigned POS_W     = 7;    // bits to hold a position 0..65
  localparam int unsigned LOCK_COUNT   = 16; // legal headers in a row to lock

  typedef logic [POS_W-1:0]     pos_t;
  typedef logic [BLOCK_W-1:0]   block_t;
  typedef logic [PAYLOAD_W-1:0] payload_t;

  typedef enum logic [1:0] {
    HDR_DATA = 2'b01,
    HDR_CTRL = 2'b10
  } sync_hdr_e;

  // A header is legal when it carries a transition.
  function automatic logic header_legal(input logic [1:0] h);
    return h[1] ^ h[0];
  endfunction

endpackage
