// tb_hs_frame_window: self-checking test of the header-sniffing window.
//
// Random frames are fed every eight clocks. After each one the test checks
// that the window holds {previous, current} frame, that new_frame_o pulses
// for exactly one cycle, that valid_o rises with the second frame, and that
// every bit of hdr_ok_o matches a header-legality test worked out from the
// two frames bit by bit.
module tb_hs_frame_window;
  import aurora_pkg::*;

  logic            clk = 1'b0;
  logic            rst;
  block_t          frame;
  logic            frame_valid;
  logic [131:0]    window;
  logic [65:0]     hdr_ok;
  logic            new_frame, valid;

  int checks = 0, failures = 0;

  hs_frame_window dut (.clk, .rst, .frame_i(frame), .frame_valid_i(frame_valid),
                       .window_o(window), .hdr_ok_o(hdr_ok), .new_frame_o(new_frame),
                       .valid_o(valid));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    block_t prev, cur;
    bit line[132];
    rst = 1'b1; frame = '0; frame_valid = 1'b0; prev = '0; cur = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int f = 0; f < 300; f++) begin
      frame = {$urandom, $urandom, 2'($urandom)};
      // Make a few frames carry deliberately illegal or legal pairs.
      if (f % 7 == 0) frame = '0;
      if (f % 11 == 0) frame = {33{2'b01}};
      frame_valid = 1'b1;
      prev = cur; cur = frame;
      @(posedge clk); #1;
      frame_valid = 1'b0;
      check(new_frame == 1'b1, "new_frame not raised");
      check(valid == (f >= 1), "valid wrong");
      check(window == {prev, cur}, "window contents");
      // Build the line-order bit list and test each position.
      for (int b = 0; b < 66; b++) begin
        line[b]      = prev[65 - b];
        line[66 + b] = cur[65 - b];
      end
      for (int p = 0; p < 66; p++)
        check(hdr_ok[p] == (line[p] != line[p + 1]), $sformatf("hdr_ok[%0d] frame %0d", p, f));
      @(posedge clk); #1;
      check(new_frame == 1'b0, "new_frame longer than one cycle");
      repeat (6) @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
