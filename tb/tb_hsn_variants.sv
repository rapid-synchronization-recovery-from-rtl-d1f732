// tb_hsn_variants: recovery sweep over the HSn variants.
//
// Six receive lanes with 1, 2, 8, 11, 33 and 66 head seekers (66 being the
// fully parallel case) are fed the same line stream. Every SEE_GAP blocks
// the stream loses d bits at the end of a block, d running from 1 to 65 and
// the whole sweep repeated REPS times, so every misalignment is met REPS
// times. For each lane the blocks lost from the fault to the first correctly
// delivered block are added up per d; delivered blocks are checked against
// the blocks sent exactly as in the end-to-end test.
//
// Besides every lane recovering from every fault, the test checks the
// trends the scheme predicts: more seekers lose fewer blocks (HS66 <= HS8 <=
// HS2 <= HS1 on average); HS1's loss grows with the bits dropped (the large
// drops cost more than the small ones); and the fully parallel lane's loss
// does not depend on d; with HS2, even drops cost more as d grows while odd
// drops do not. The average loss per d is printed for every lane.
module tb_hsn_variants;
  import aurora_pkg::*;

  localparam int NV = 6;
  localparam int NS [NV] = '{1, 2, 8, 11, 33, 66};
  localparam int REPS = 66;
  localparam int SEE_FIRST = 150, SEE_GAP = 120;
  localparam int N_SEE = 65 * REPS;

  logic        clk = 1'b0;
  logic        rst;
  logic [31:0] word;
  logic        word_valid;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  task automatic fail(input string msg);
    failures++;
    $display("FAIL @%0t: %s", $time, msg);
  endtask

  // ---------------- transmitter model ----------------
  bit         line_q[$];
  bit         tx_hist[$];
  logic [1:0] sent_hdr[$];
  payload_t   sent_data[$];
  int         nblk = 0;
  int         see_of_blk[int];     // block index -> bits dropped after it

  function automatic void gen_block();
    logic [1:0] h;
    payload_t   s, d;
    h = ($urandom_range(0, 9) == 0) ? 2'b10 : 2'b01;
    s = {$urandom, $urandom};
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
    if (see_of_blk.exists(nblk)) repeat (see_of_blk[nblk]) void'(line_q.pop_back());
    nblk++;
  endfunction

  // ---------------- lanes and their checkers ----------------
  int lost_sum [NV][66];
  int lost_cnt [NV][66];
  int bad_cnt  [NV];

  for (genvar v = 0; v < NV; v++) begin : g_lane
    localparam int N = NS[v];
    logic [1:0]  header;
    payload_t    data;
    logic        data_valid, locked;
    pos_t        lock_pos;
    logic [(N > 1 ? $clog2(N) : 1)-1:0] winner;
    logic [N-1:0] s_locked, s_moved;

    aurora_rx_lane_hsn #(.N(N)) u_lane (
      .clk, .rst, .word_i(word), .word_valid_i(word_valid),
      .header_o(header), .data_o(data), .data_valid_o(data_valid),
      .locked_o(locked), .lock_pos_o(lock_pos), .winner_o(winner),
      .seeker_locked_o(s_locked), .seeker_moved_o(s_moved));

    int last_good = -1;

    always @(negedge clk) begin
      if (!rst && data_valid) begin
        int j;
        j = -1;
        for (int k = last_good + 1; k < sent_data.size() && k < last_good + 400; k++)
          if (sent_data[k] == data && sent_hdr[k] == header) begin j = k; break; end
        checks++;
        if (j < 0) begin
          bad_cnt[v]++;
          if (last_good >= 0 && !see_of_blk.exists(last_good) && !see_of_blk.exists(last_good + 1))
            fail($sformatf("HS%0d: wrong block after block %0d", N, last_good));
        end else begin
          if (last_good >= 0 && j != last_good + 1) begin
            int b;
            b = see_of_blk.exists(last_good) ? last_good :
                see_of_blk.exists(last_good + 1) ? last_good + 1 : -1;
            if (b < 0) fail($sformatf("HS%0d: blocks %0d..%0d lost without a fault", N, last_good + 1, j - 1));
            else begin
              lost_sum[v][see_of_blk[b]] += j - last_good - 1;
              lost_cnt[v][see_of_blk[b]]++;
            end
          end
          last_good = j;
        end
      end
    end
  end

  function automatic real avg(input int v, input int lo, input int hi);
    int s = 0, c = 0;
    for (int d = lo; d <= hi; d++) begin s += lost_sum[v][d]; c += lost_cnt[v][d]; end
    return (c == 0) ? 0.0 : real'(s) / real'(c);
  endfunction

  initial begin
    real a [NV];
    for (int v = 0; v < NV; v++) begin
      bad_cnt[v] = 0;
      for (int d = 0; d < 66; d++) begin lost_sum[v][d] = 0; lost_cnt[v][d] = 0; end
    end
    for (int e = 0; e < N_SEE; e++) see_of_blk[SEE_FIRST + e * SEE_GAP] = (e % 65) + 1;
    for (int i = 0; i < 58; i++) tx_hist.push_back(1'($urandom));
    for (int i = 0; i < 23; i++) line_q.push_back(1'($urandom));

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

    $display("Average blocks lost after d bits dropped (%0d runs per d):", REPS);
    for (int v = 0; v < NV; v++) begin
      string s;
      s = $sformatf("HS%-2d", NS[v]);
      for (int d = 1; d <= 65; d++) begin
        checks++;
        if (lost_cnt[v][d] != REPS)
          fail($sformatf("HS%0d recovered %0d of %0d times from d=%0d", NS[v], lost_cnt[v][d], REPS, d));
        if (d % 4 == 1) s = {s, $sformatf(" %0d:%0.1f", d, avg(v, d, d))};
      end
      a[v] = avg(v, 1, 65);
      $display("%s", s);
    end
    for (int v = 0; v < NV; v++)
      $display("HS%-2d average %0.2f blocks lost, %0.1f%% of HS1, %0d wrong blocks passed",
               NS[v], a[v], 100.0 * a[v] / a[0], bad_cnt[v]);
    checks++; if (!(a[5] <= a[2] && a[2] <= a[1] && a[1] <= a[0])) fail("loss does not fall with more seekers");
    checks++; if (!(avg(0, 50, 65) > avg(0, 1, 16) + 8.0)) fail("HS1 loss does not grow with the bits dropped");
    // HS2: an even drop leaves the boundary with the seeker that held it,
    // which walks to it (loss grows with d); an odd drop hands it to the
    // free-running seeker (loss flat).
    begin
      real ev_lo, ev_hi, od_lo, od_hi;
      ev_lo = 0; ev_hi = 0; od_lo = 0; od_hi = 0;
      for (int d = 2; d <= 16; d += 2) ev_lo += avg(1, d, d) / 8.0;
      for (int d = 50; d <= 64; d += 2) ev_hi += avg(1, d, d) / 8.0;
      for (int d = 1; d <= 15; d += 2) od_lo += avg(1, d, d) / 8.0;
      for (int d = 51; d <= 65; d += 2) od_hi += avg(1, d, d) / 8.0;
      $display("HS2 even drops: %0.1f (2..16) -> %0.1f (50..64); odd drops: %0.1f (1..15) -> %0.1f (51..65)",
               ev_lo, ev_hi, od_lo, od_hi);
      checks++; if (!(ev_hi > ev_lo + 8.0)) fail("HS2 loss on even drops does not grow");
      checks++; if (!(od_hi < od_lo + 3.0)) fail("HS2 loss on odd drops is not flat");
    end
    checks++; if (!(avg(5, 50, 65) < avg(5, 1, 16) + 3.0 && avg(5, 50, 65) > avg(5, 1, 16) - 3.0))
      fail("HS66 loss depends on the bits dropped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (SEE_FIRST * 9 + N_SEE * SEE_GAP * 9 + 2000) @(posedge clk);
    fail("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
