// tb_wf_pkg: self-checking test of the shared package's line helpers.
//
// For random lines, word offsets, data and byte enables, line_word must
// return the addressed 64-bit word and merge_word must replace exactly the
// enabled bytes of that word and leave the rest of the line untouched. The
// expected values are built byte by byte in the testbench.
module tb_wf_pkg;
  import wf_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    line_t l, m, e;
    woff_t o;
    word_t d;
    be_t   be;
    checks++;
    if (LADDR_W != 42 || LINE_W != 512 || WORDS != 8) begin
      failures++;
      $display("FAIL: widths");
    end
    for (int it = 0; it < 2000; it++) begin
      for (int b = 0; b < LINE_BYTES; b++) l[b*8 +: 8] = 8'($urandom);
      o  = woff_t'($urandom);
      d  = {$urandom, $urandom};
      be = be_t'($urandom);
      e  = l;
      for (int b = 0; b < BE_W; b++) if (be[b]) e[(int'(o) * 8 + b) * 8 +: 8] = d[b*8 +: 8];
      m = merge_word(l, o, d, be);
      checks++;
      if (m != e) begin failures++; $display("FAIL: merge_word"); end
      checks++;
      if (line_word(l, o) != l[int'(o)*64 +: 64]) begin failures++; $display("FAIL: line_word"); end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
