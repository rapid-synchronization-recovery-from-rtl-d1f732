// tb_hs_seeker: self-checking test of one head seeker (seeker 3 of 8).
//
// The legality vector is driven directly, with a new frame every eight
// clocks. Directed phases check the numbers the scheme fixes: an illegal
// header costs one clock (fail-fast: three wrong positions are passed in the
// first three clocks of a frame), a legal one is tested once per frame, the
// lock comes with exactly the 16th legal header in a row, it holds while
// headers stay legal and drops on the first illegal one. A random phase
// then compares position and lock every clock with a reference model that
// walks the seeker's position list 3, 59, 51, ..., 11.
module tb_hs_seeker;
  import aurora_pkg::*;

  localparam int N = 8, INDEX = 3;

  logic        clk = 1'b0;
  logic        rst;
  logic [65:0] hdr_ok;
  logic        new_frame, win_valid;
  pos_t        pos;
  logic        locked, moved;

  int checks = 0, failures = 0;

  hs_seeker #(.N(N), .INDEX(INDEX)) dut (
    .clk, .rst, .hdr_ok_i(hdr_ok), .new_frame_i(new_frame), .window_valid_i(win_valid),
    .pos_o(pos), .locked_o(locked), .moved_o(moved));

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, msg); end
  endtask

  // Reference model state.
  int  plist[$];
  int  r_i, r_cnt;
  bit  r_pend;
  bit  model_on = 1'b0;

  always @(posedge clk) begin
    if (rst) begin
      r_i = 0; r_cnt = 0; r_pend = 0;
    end else begin
      bit p;
      p = new_frame | r_pend;
      if (win_valid && p) begin
        if (hdr_ok[plist[r_i]]) begin
          r_cnt = (r_cnt < 16) ? r_cnt + 1 : 16; r_pend = 0;
        end else begin
          r_cnt = 0; r_i = (r_i + 1) % plist.size(); r_pend = 1;
        end
      end else r_pend = 0;
    end
  end

  always @(negedge clk) begin
    if (model_on) begin
      check(int'(pos) == plist[r_i], $sformatf("pos %0d model %0d", pos, plist[r_i]));
      check(locked == (r_cnt == 16), "locked differs from model");
    end
  end

  // One frame: new_frame for a cycle, then seven idle cycles.
  task automatic frame(input logic [65:0] ok);
    hdr_ok = ok; new_frame = 1'b1;
    @(posedge clk); #1 new_frame = 1'b0;
    repeat (7) @(posedge clk);
    #1;
  endtask

  initial begin
    logic [65:0] only43, only35;
    int moves_seen;
    plist.push_back(INDEX);
    for (int p = INDEX + N * ((65 - INDEX) / N); p > INDEX; p -= N) plist.push_back(p);
    only43 = 66'b1 << 43; only35 = 66'b1 << 35;

    rst = 1'b1; hdr_ok = '0; new_frame = 1'b0; win_valid = 1'b0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0; win_valid = 1'b1;
    check(pos == pos_t'(INDEX), "reset position");

    // First frame: 3, 59 and 51 are illegal, 43 legal -> three moves in three clocks.
    hdr_ok = only43; new_frame = 1'b1;
    moves_seen = 0;
    @(negedge clk); moves_seen += moved; check(pos == 3, "checks 3 first");
    @(posedge clk); #1 new_frame = 1'b0;
    @(negedge clk); moves_seen += moved; check(pos == 59, "then 59 after one clock");
    @(negedge clk); moves_seen += moved; check(pos == 51, "then 51 after one clock");
    @(negedge clk); moves_seen += moved; check(pos == 43, "then 43 after one clock");
    check(moves_seen == 3, "three fail-fast moves");
    repeat (4) @(posedge clk);
    #1;
    model_on = 1'b1;
    // 14 more legal frames: 15 in a row, not yet locked.
    repeat (14) frame(only43);
    check(!locked, "locked before 16 legal headers");
    frame(only43);
    check(locked, "not locked on the 16th legal header");
    check(pos == 43, "locked position");
    repeat (30) frame(only43);
    check(locked, "lock held");
    // Position 43 turns illegal: lock drops and 35 is taken at once.
    frame(only35);
    check(!locked, "lock kept after illegal header");
    check(pos == 35, "moved to 35");
    // Random headers, about half legal, and periods where the window is not valid.
    for (int f = 0; f < 3000; f++) begin
      logic [65:0] v;
      v = {$urandom, $urandom, 2'($urandom)};
      if (f % 97 < 40) v = v | (66'b1 << plist[f / 97 % plist.size()]);
      win_valid = (f % 500) > 5;
      frame(v);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
