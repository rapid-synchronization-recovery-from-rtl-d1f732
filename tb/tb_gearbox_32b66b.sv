// tb_gearbox_32b66b: self-checking test of the 32b->66b gearbox.
//
// Random words are fed with one word every four clocks (the rate of a 1:8
// DDR deserializer) and then with one word every clock. Every bit that goes
// in is also appended to a reference bit queue; every frame that comes out
// must equal the next 66 bits of that queue. The test also checks the
// frame rate the format implies: 33 words make exactly 16 frames.
module tb_gearbox_32b66b;
  import aurora_pkg::*;

  logic          clk = 1'b0;
  logic          rst;
  logic [31:0]   word;
  logic          word_valid;
  block_t        frame;
  logic          frame_valid;

  int checks = 0, failures = 0;
  bit ref_q[$];
  int frames = 0, words = 0;

  gearbox_32b66b dut (.clk, .rst, .word_i(word), .word_valid_i(word_valid),
                      .frame_o(frame), .frame_valid_o(frame_valid));

  always #5 clk = ~clk;

  // Compare every frame with the reference bit stream.
  always @(posedge clk) begin
    if (!rst && frame_valid) begin
      block_t exp;
      for (int b = BLOCK_W - 1; b >= 0; b--) exp[b] = ref_q.pop_front();
      checks++;
      frames++;
      if (frame !== exp) begin
        failures++;
        $display("FAIL frame %0d: got %h exp %h", frames, frame, exp);
      end
    end
  end

  task automatic send(input int gap);
    word       = $urandom;
    word_valid = 1'b1;
    for (int b = 31; b >= 0; b--) ref_q.push_back(word[b]);
    words++;
    @(posedge clk); #1;
    word_valid = 1'b0;
    repeat (gap - 1) @(posedge clk);
    #1;
  endtask

  initial begin
    rst = 1'b1; word = '0; word_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    // 33 words at the deserializer rate: exactly 16 frames.
    repeat (33) send(4);
    repeat (4) @(posedge clk);
    #1;
    checks++;
    if (frames != 16) begin
      failures++;
      $display("FAIL: %0d frames from 33 words, expected 16", frames);
    end
    // Long random run, alternating the two input rates.
    for (int i = 0; i < 2000; i++) send((i % 200 < 100) ? 1 : 4);
    repeat (10) @(posedge clk);
    checks++;
    if (ref_q.size() >= BLOCK_W) begin
      failures++;
      $display("FAIL: %0d bits left unframed", ref_q.size());
    end
    $display("frames=%0d words=%0d", frames, words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
