// tb_hs_block_aligner: self-checking test of the block aligner.
//
// A random two-frame window is presented with a new-frame pulse and a lock
// position; one clock later the aligner must put out the 66 bits that start
// at that position (worked out here bit by bit in line order), and flag
// whether the block continues the previous run. Frames without a lock must
// produce no block.
module tb_hs_block_aligner;
  import aurora_pkg::*;

  logic          clk = 1'b0;
  logic          rst;
  logic [131:0]  window;
  logic          new_frame, lock_valid;
  pos_t          lock_pos;
  block_t        block;
  logic          block_valid, restart;

  int checks = 0, failures = 0;

  hs_block_aligner dut (.clk, .rst, .window_i(window), .new_frame_i(new_frame),
                        .lock_valid_i(lock_valid), .lock_pos_i(lock_pos),
                        .block_o(block), .block_valid_o(block_valid), .restart_o(restart));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  initial begin
    int  prev_pos;
    bit  prev_run;
    rst = 1'b1; window = '0; new_frame = 1'b0; lock_valid = 1'b0; lock_pos = '0;
    prev_pos = 0; prev_run = 0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int f = 0; f < 2000; f++) begin
      block_t exp;
      int  p;
      bit  lk;
      window = {$urandom, $urandom, $urandom, $urandom, 4'($urandom)};
      p  = (f % 40 < 20) ? 17 : $urandom_range(0, 65);
      lk = (f % 13) != 0;
      // Window bit index of the first line bit is 131; position p starts p bits later.
      for (int b = 0; b < 66; b++) exp[65 - b] = window[131 - p - b];
      new_frame = 1'b1;
      @(posedge clk); #1 new_frame = 1'b0;
      lock_valid = lk; lock_pos = pos_t'(p);
      @(posedge clk); #1;
      check(block_valid == lk, "block_valid");
      if (lk) begin
        check(block == exp, $sformatf("block at position %0d", p));
        check(restart == (!prev_run || prev_pos != p), "restart flag");
      end
      prev_run = lk; prev_pos = p;
      lock_valid = 1'b0;
      repeat (5) @(posedge clk);
      #1;
      check(!block_valid, "block_valid only once per frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
