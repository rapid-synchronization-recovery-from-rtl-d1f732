// tb_aurora_rx_lane_hsn: end-to-end test of the HSn receive lane at its
// default size (8 head seekers).
//
// A transmitter model builds a line stream of 66-bit blocks (random legal
// headers, a tenth of them control blocks, and random scrambled payloads
// whose plain text is worked out by a serial descrambler model), starts it
// 7 bits into the first gearbox frame and feeds it as one 32-bit word every
// four clocks. Every descrambled block the lane delivers is looked up among
// the blocks sent; blocks must come in order, and a block that matches none
// or a gap in the sequence is only allowed right after an injected fault.
//
// Phases:
//   * start-up: a false header position (2, served by seeker 2) is forced
//     legal alongside the true one (7, seeker 7) for 40 blocks, so both
//     seekers lock on the same frame, the tie goes to seeker 2, and when the
//     false position fails the lock passes to seeker 7 without a gap;
//   * blocks 100-140: the false position is forced again; seeker 2 locks
//     but seeker 7 must remain the winner;
//   * from block 200, one fault every 120 blocks: bits dropped at the end
//     of a block, 1 to 65 of them, then bits inserted, 1 to 65. After each
//     the lane must lock on the new boundary and deliver correct blocks.
// Checked numbers: the first lock comes with the 16th frame the seekers
// test; every block leaves four clocks after the gearbox frame that
// completes it; while locked, blocks leave 8 clocks apart, or 12 once in 16 blocks
// (33 words of 32 bits make 16 blocks: 8.25 clocks per block on average). The blocks lost per
// fault are printed, and every mechanism the lane has is counted and must
// have happened at least once.
module tb_aurora_rx_lane_hsn;
  import aurora_pkg::*;

  localparam int N        = 8;
  localparam int PREAMBLE = 7;      // true header position at start
  localparam int SEE_FIRST = 200, SEE_GAP = 120, N_SEE = 130;

  logic          clk = 1'b0;
  logic          rst;
  logic [31:0]   word;
  logic          word_valid;
  logic [1:0]    header;
  payload_t      data;
  logic          data_valid, locked;
  pos_t          lock_pos;
  logic [2:0]    winner;
  logic [N-1:0]  s_locked, s_moved;

  int checks = 0, failures = 0;

  aurora_rx_lane_hsn dut (
    .clk, .rst, .word_i(word), .word_valid_i(word_valid),
    .header_o(header), .data_o(data), .data_valid_o(data_valid),
    .locked_o(locked), .lock_pos_o(lock_pos), .winner_o(winner),
    .seeker_locked_o(s_locked), .seeker_moved_o(s_moved));

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ---------------- transmitter model ----------------
  bit           line_q[$];
  bit           tx_hist[$];      // scrambled payload bits sent, newest last
  logic [1:0]   sent_hdr[$];
  payload_t     sent_data[$];
  int           nblk = 0;
  int           see_blk[N_SEE], see_d[N_SEE];
  int           see_lost[N_SEE];
  bit           see_done[N_SEE];

  function automatic bit forced(input int b);
    return (b < 40) || (b >= 100 && b < 140);
  endfunction

  function automatic void gen_block();
    logic [1:0] h;
    payload_t   s, d;
    int         b = nblk;
    h = ($urandom_range(0, 9) == 0) ? 2'b10 : 2'b01;
    s = {$urandom, $urandom};
    // Line bits 61 and 62 of the block lie at window position 2 while the
    // boundary is at 7; make them differ to fake a legal header there.
    if (forced(b)) s[4] = ~s[3];
    line_q.push_back(h[1]);
    line_q.push_back(h[0]);
    for (int j = 63; j >= 0; j--) begin
      d[j] = s[j] ^ tx_hist[tx_hist.size() - 39] ^ tx_hist[tx_hist.size() - 58];
      tx_hist.push_back(s[j]);
      void'(tx_hist.pop_front());
      line_q.push_back(s[j]);
    end
    sent_hdr.push_back(h);
    sent_data.push_back(d);
    for (int e = 0; e < N_SEE; e++)
      if (see_blk[e] == b) begin
        if (see_d[e] < 0) repeat (-see_d[e]) void'(line_q.pop_back());
        else repeat (see_d[e]) line_q.push_back(1'($urandom));
      end
    nblk++;
  endfunction

  // ---------------- receiver checking ----------------
  int  last_good = -1;       // index of the last block received correctly
  int  good = 0, bad = 0, ctrl_seen = 0;
  int  last_valid_cyc = -1, cyc = 0;

  function automatic bit see_near(input int l);
    for (int e = 0; e < N_SEE; e++)
      if (see_blk[e] == l || see_blk[e] == l + 1) return 1'b1;
    return 1'b0;
  endfunction

  always @(posedge clk) cyc++;

  always @(negedge clk) begin
    if (!rst && data_valid) begin
      int j;
      j = -1;
      for (int k = last_good + 1; k < sent_data.size() && k < last_good + 400; k++)
        if (sent_data[k] == data && sent_hdr[k] == header) begin j = k; break; end
      checks++;
      if (j < 0) begin
        bad++;
        if (last_good >= 45 && !see_near(last_good))
          fail($sformatf("wrong block delivered after block %0d", last_good));
      end else begin
        if (last_good >= 0 && j != last_good + 1) begin
          bit explained;
          explained = 1'b0;
          for (int e = 0; e < N_SEE; e++)
            if (!see_done[e] && (see_blk[e] == last_good || see_blk[e] == last_good + 1)) begin
              see_done[e] = 1'b1;
              see_lost[e] = j - last_good - 1;
              explained = 1'b1;
            end
          if (!explained && last_good >= 45)
            fail($sformatf("blocks %0d..%0d lost without a fault", last_good + 1, j - 1));
        end else if (last_good >= 0 && j == last_good + 1 && last_valid_cyc >= 0) begin
          checks++;
          if (cyc - last_valid_cyc != 8 && cyc - last_valid_cyc != 12)
            fail($sformatf("block spacing %0d clocks", cyc - last_valid_cyc));
        end
        for (int e = 0; e < N_SEE; e++)
          if (!see_done[e] && see_blk[e] <= last_good + 1 && see_blk[e] >= 0 && see_blk[e] < j
              && j == last_good + 1) begin
            // Fault absorbed without losing a block: cannot happen for a
            // shifted boundary, record it anyway.
            see_done[e] = 1'b1; see_lost[e] = 0;
          end
        good++;
        if (header == 2'b10) ctrl_seen++;
        last_good = j;
      end
      last_valid_cyc = cyc;
    end
  end

  // ---------------- mechanism counters ----------------
  int n_first_lock = 0, n_tie = 0, n_multi = 0, n_hold = 0, n_switch = 0;
  int n_moves = 0, n_fast = 0, n_wrap = 0, n_restart = 0, n_unlock = 0;
  int frames = 0, first_lock_frame = -1;
  logic [N-1:0] s_locked_d = '0, s_moved_d = '0;
  logic         locked_d = 1'b0;
  logic [2:0]   winner_d = '0;
  pos_t [N-1:0] s_pos_d;

  logic [4:0] fv_hist = '0;   // gearbox frame strobe, last five clocks
  int n_latency = 0;

  always @(negedge clk) begin
    if (!rst) begin
      fv_hist = {fv_hist[3:0], dut.frame_valid};
      // Each delivered block leaves four clocks after the frame completing it.
      if (data_valid) begin
        checks++; n_latency++;
        if (!fv_hist[4]) fail("block not delivered four clocks after its frame");
      end
      if (dut.frame_valid) frames++;
      if (locked && !locked_d && first_lock_frame < 0) begin
        first_lock_frame = frames; n_first_lock++;
      end
      if (!locked && locked_d) n_unlock++;
      if ($countones(s_locked & ~s_locked_d) >= 2) n_tie++;
      if ($countones(s_locked) >= 2) n_multi++;
      if (locked && (s_locked & ((8'b1 << winner) - 8'b1)) != '0) n_hold++;
      if (locked && locked_d && winner != winner_d) n_switch++;
      n_moves += $countones(s_moved);
      if ((s_moved & s_moved_d) != '0) n_fast++;
      for (int i = 0; i < N; i++)
        if (dut.u_sync.seeker_pos_o[i] > s_pos_d[i]) n_wrap++;
      if (dut.block_valid && dut.restart) n_restart++;
      s_locked_d = s_locked; s_moved_d = s_moved; locked_d = locked; winner_d = winner;
      s_pos_d = dut.u_sync.seeker_pos_o;
    end
  end

  task automatic need(input int n, input string what);
    checks++;
    $display("  %-38s %0d", what, n);
    if (n == 0) fail({what, " never happened"});
  endtask

  // ---------------- stimulus ----------------
  initial begin
    int sum_drop, sum_add, worst;
    sum_drop = 0; sum_add = 0; worst = 0;
    for (int e = 0; e < N_SEE; e++) begin
      see_blk[e] = SEE_FIRST + e * SEE_GAP;
      see_d[e]   = (e < 65) ? -(e + 1) : (e - 64);
      see_done[e] = 1'b0; see_lost[e] = -1;
    end
    for (int i = 0; i < 58; i++) tx_hist.push_back(1'($urandom));
    // Preamble: line bits 2 and 3 differ, so the false position 2 is legal
    // from the very first frame, like the true one at 7.
    for (int i = 0; i < PREAMBLE; i++) line_q.push_back((i == 2) ? 1'b1 : (i == 3) ? 1'b0 : 1'($urandom));
    for (int i = 0; i < N; i++) s_pos_d[i] = '0;

    rst = 1'b1; word = '0; word_valid = 1'b0;
    repeat (4) @(posedge clk);
    #1 rst = 1'b0;
    while (nblk < SEE_FIRST + N_SEE * SEE_GAP + 60) begin
      while (line_q.size() < 32) gen_block();
      for (int b = 31; b >= 0; b--) word[b] = line_q.pop_front();
      word_valid = 1'b1;
      @(posedge clk); #1 word_valid = 1'b0;
      repeat (3) @(posedge clk);
      #1;
    end
    repeat (40) @(posedge clk);
    #1;

    checks++;
    if (first_lock_frame != 17)
      fail($sformatf("first lock after %0d frames, expected 17 (2 to fill the window + 15)", first_lock_frame));
    $display("Blocks lost per fault (d<0: bits dropped, d>0: bits inserted):");
    for (int e = 0; e < N_SEE; e++) begin
      checks++;
      if (!see_done[e]) fail($sformatf("no recovery from fault d=%0d", see_d[e]));
      if (see_d[e] < 0) sum_drop += see_lost[e]; else sum_add += see_lost[e];
      if (see_lost[e] > worst) worst = see_lost[e];
      if (e % 13 == 12 || e == N_SEE - 1) begin
        string s;
        s = "";
        for (int k = e - (e % 13); k <= e; k++) s = {s, $sformatf(" %0d:%0d", see_d[k], see_lost[k])};
        $display(" %s", s);
      end
    end
    $display("Average blocks lost: %0.2f (drops), %0.2f (inserts), worst %0d",
             real'(sum_drop) / 65.0, real'(sum_add) / 65.0, worst);
    checks++;
    if (worst > 40) fail("a recovery took more than 40 blocks");
    checks++;
    if (last_good < nblk - 70) fail("lane not delivering at the end");
    $display("Blocks delivered %0d, wrong %0d, sent %0d", good, bad, nblk);
    $display("Mechanisms:");
    need(n_first_lock, "first lock");
    need(n_tie,        "seekers locking on the same frame");
    need(n_multi,      "cycles with several seekers locked");
    need(n_hold,       "cycles a winner held over a lower lock");
    need(n_switch,     "winner changes without losing lock");
    need(n_moves,      "fail-fast moves");
    need(n_fast,       "moves on consecutive clocks");
    need(n_wrap,       "position list wrap-arounds");
    need(n_unlock,     "losses of lock");
    need(n_restart,    "descrambler restarts");
    need(ctrl_seen,    "control blocks delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
