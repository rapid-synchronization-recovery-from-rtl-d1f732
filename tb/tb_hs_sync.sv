// tb_hs_sync: self-checking test of the HSn unit (8 seekers) and its winner
// rules.
//
// The header-legality vector is driven directly, one frame every eight
// clocks. Positions 20 (seeker 4) and 13 (seeker 5) are legal from the
// start, so both seekers lock on the same frame, the 16th: the tie must go to
// one of them (seeker 4 here) and the lock must not come a frame early.
// Then 20 turns illegal and the lock must pass to seeker 5 without a gap.
// Position 8 (seeker 0) is made legal; seeker 0 locks, but seeker 5 must
// stay the winner while its headers stay legal. When 13 turns illegal the
// winner must become seeker 0 at position 8, and with no legal position left
// the lock must drop. Every position is then locked in turn, and a long
// random phase compares the winner with a reference model on every clock.
module tb_hs_sync;
  import aurora_pkg::*;

  localparam int N = 8;

  logic          clk = 1'b0;
  logic          rst;
  logic [65:0]   hdr_ok;
  logic          new_frame, win_valid;
  logic          lock_valid;
  pos_t          lock_pos;
  logic [2:0]    winner;
  logic [N-1:0]  s_locked, s_moved;
  pos_t [N-1:0]  s_pos;

  int checks = 0, failures = 0;

  hs_sync #(.N(N)) dut (
    .clk, .rst, .hdr_ok_i(hdr_ok), .new_frame_i(new_frame), .window_valid_i(win_valid),
    .lock_valid_o(lock_valid), .lock_pos_o(lock_pos), .winner_o(winner),
    .seeker_locked_o(s_locked), .seeker_pos_o(s_pos), .seeker_moved_o(s_moved));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // Lock must never fall while some seeker is locked.
  always @(negedge clk)
    if (!rst && win_valid) begin
      checks++;
      if (lock_valid != (s_locked != '0)) begin
        failures++; $display("FAIL @%0t: lock_valid %b with seekers %b", $time, lock_valid, s_locked);
      end
    end

  // Reference model of the winner rules, checked every clock: the previous
  // winner is kept while its seeker stays locked, else the lowest locked
  // seeker is taken.
  int  m_win = -1;
  always @(negedge clk) begin
    if (!rst && win_valid) begin
      int w;
      w = -1;
      if (m_win >= 0 && s_locked[m_win]) w = m_win;
      else for (int i = N - 1; i >= 0; i--) if (s_locked[i]) w = i;
      checks++;
      if ((w >= 0) != lock_valid || (w >= 0 && (int'(winner) != w || lock_pos != s_pos[w]))) begin
        failures++;
        $display("FAIL @%0t: winner %0d/%b pos %0d, model %0d", $time, winner, lock_valid, lock_pos, w);
      end
      m_win = w;
    end
  end

  task automatic frame(input logic [65:0] ok);
    hdr_ok = ok; new_frame = 1'b1;
    @(posedge clk); #1 new_frame = 1'b0;
    repeat (7) @(posedge clk);
    #1;
  endtask

  localparam logic [65:0] P8 = 66'b1 << 8, P13 = 66'b1 << 13, P20 = 66'b1 << 20;

  initial begin
    rst = 1'b1; hdr_ok = '0; new_frame = 1'b0; win_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0; win_valid = 1'b1;

    repeat (15) frame(P13 | P20);
    check(!lock_valid, "locked before the 16th legal header");
    frame(P13 | P20);
    check(s_locked == 8'b0011_0000, "seekers 4 and 5 lock together");
    check(lock_valid && winner == 3'd4 && lock_pos == 7'd20, "tie goes to seeker 4 at 20");

    frame(P13);
    check(lock_valid && winner == 3'd5 && lock_pos == 7'd13, "lock passes to seeker 5 at 13");

    repeat (20) frame(P13 | P8);
    check(s_locked[0], "seeker 0 locked at 8");
    check(lock_valid && winner == 3'd5 && lock_pos == 7'd13, "seeker 5 stays winner");

    frame(P8);
    check(lock_valid && winner == 3'd0 && lock_pos == 7'd8, "winner becomes seeker 0 at 8");

    frame('0);
    check(!lock_valid, "lock dropped with no legal header");

    // All 66 positions, one at a time: each must be found and locked.
    for (int p = 0; p < 66; p++) begin
      repeat (18) frame(66'b1 << p);
      check(lock_valid && lock_pos == pos_t'(p) && int'(winner) == p % N,
            $sformatf("lock on position %0d", p));
    end
    // Random legality with a few positions held legal for long stretches, so
    // that false locks, holds and handovers happen in every combination.
    for (int f = 0; f < 3000; f++) begin
      logic [65:0] v;
      v = {$urandom, $urandom, 2'($urandom)};
      for (int k = 0; k < 4; k++)
        if (((f / 23 + k * 7) % 5) < 3) v[(k * 17 + f / 120) % 66] = 1'b1;
      frame(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
