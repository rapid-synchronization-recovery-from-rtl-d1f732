// tb_hs_select_tree: self-checking test of the locked-seeker select tree.
//
// Two trees, of 8 and of 11 inputs (a size that is not a power of two),
// are driven with every pattern of lock flags (8 inputs) or random sparse
// patterns (11 inputs). Each result is compared with the lowest set bit
// found by a plain loop.
module tb_hs_select_tree;
  logic [7:0]  l8;
  logic [10:0] l11;
  logic        any8, any11;
  logic [2:0]  idx8;
  logic [3:0]  idx11;

  int checks = 0, failures = 0;

  hs_select_tree #(.N(8))  u8  (.locked_i(l8),  .any_o(any8),  .idx_o(idx8));
  hs_select_tree #(.N(11)) u11 (.locked_i(l11), .any_o(any11), .idx_o(idx11));

  function automatic int lowest(input logic [31:0] v, input int n);
    for (int i = 0; i < n; i++) if (v[i]) return i;
    return -1;
  endfunction

  initial begin
    for (int v = 0; v < 256; v++) begin
      int e;
      l8 = 8'(v); l11 = '0;
      #1;
      e = lowest(32'(v), 8);
      checks++;
      if (any8 != (e >= 0) || (e >= 0 && int'(idx8) != e)) begin
        failures++; $display("FAIL N=8 v=%b any=%b idx=%0d", l8, any8, idx8);
      end
    end
    for (int t = 0; t < 2000; t++) begin
      int e;
      l11 = 11'($urandom) & 11'($urandom) & 11'($urandom);
      #1;
      e = lowest(32'(l11), 11);
      checks++;
      if (any11 != (e >= 0) || (e >= 0 && int'(idx11) != e)) begin
        failures++; $display("FAIL N=11 v=%b any=%b idx=%0d", l11, any11, idx11);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
