// tb_descrambler_64b66b: self-checking test of the 64b/66b descrambler.
//
// Random payloads are scrambled one bit at a time with a serial model of the
// transmitter's scrambler, s(n) = d(n) ^ s(n-39) ^ s(n-58), started from a
// random state, and sent as blocks with random legal headers. The first
// block is flagged as a restart and must not be marked valid; every later
// block must come back, one clock later, with its header and exactly the
// payload that was scrambled. A second restart in the middle, after a burst
// of corrupted blocks, checks that the descrambler recovers by itself.
module tb_descrambler_64b66b;
  import aurora_pkg::*;

  logic        clk = 1'b0;
  logic        rst;
  block_t      blk;
  logic        valid, restart;
  logic [1:0]  header;
  payload_t    data;
  logic        dvalid;

  int checks = 0, failures = 0;

  descrambler_64b66b dut (.clk, .rst, .block_i(blk), .valid_i(valid), .restart_i(restart),
                          .header_o(header), .data_o(data), .valid_o(dvalid));

  always #5 clk = ~clk;

  bit scr_hist[$];   // transmitted scrambled bits, newest last

  function automatic block_t scramble(input logic [1:0] h, input payload_t d);
    block_t b;
    b[65:64] = h;
    for (int j = 63; j >= 0; j--) begin
      bit s;
      s = d[j] ^ scr_hist[scr_hist.size() - 39] ^ scr_hist[scr_hist.size() - 58];
      scr_hist.push_back(s);
      void'(scr_hist.pop_front());
      b[j] = s;
    end
    return b;
  endfunction

  initial begin
    rst = 1'b1; blk = '0; valid = 1'b0; restart = 1'b0;
    for (int i = 0; i < 58; i++) scr_hist.push_back(1'($urandom));
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int n = 0; n < 1000; n++) begin
      payload_t d;
      logic [1:0] h;
      bit rs;
      d = {$urandom, $urandom};
      h = ($urandom_range(0, 9) == 0) ? 2'b10 : 2'b01;
      blk = scramble(h, d);
      rs = (n == 0) || (n == 500);
      // Corrupt the three blocks before the second restart.
      if (n >= 497 && n < 500) blk[40:0] = ~blk[40:0];
      valid = 1'b1; restart = rs;
      @(posedge clk); #1;
      valid = 1'b0; restart = 1'b0;
      checks++;
      if (rs || (n >= 497 && n < 500)) begin
        if (rs && dvalid) begin failures++; $display("FAIL: restart block marked valid"); end
      end else if (!dvalid || header != h || data != d) begin
        failures++;
        $display("FAIL block %0d: valid=%b hdr=%b data=%h exp %h", n, dvalid, header, data, d);
      end
      // Idle gap of a varying length: the output must hold and stay invalid.
      repeat (n % 8) begin
        @(posedge clk); #1;
        checks++;
        if (dvalid) begin failures++; $display("FAIL: valid without input"); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
