// tb_wf_dup_tags: self-checking test of the duplicated WF tag storage.
//
// Random entry loads and invalidations are applied to the block and to a
// reference copy of tags and valid bits; every cycle a snooped address,
// chosen half the time from the stored tags, must give the same hit and
// entry as the reference.
module tb_wf_dup_tags;
  import wf_pkg::*;
  localparam int ENTRIES = 8;
  logic clk = 0, rst_n = 0;
  logic set_valid, clr_valid, snp_hit;
  logic [2:0] set_idx, clr_idx, snp_idx;
  laddr_t set_tag, snp_tag;
  int checks = 0, failures = 0;

  wf_dup_tags #(.ENTRIES(ENTRIES)) dut (.*);

  always #5 clk = ~clk;

  laddr_t rtag [ENTRIES];
  bit     rval [ENTRIES];

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    set_valid = 0; clr_valid = 0; set_idx = 0; clr_idx = 0; set_tag = '0; snp_tag = '0;
    foreach (rval[i]) begin rval[i] = 0; rtag[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 3000; it++) begin
      @(negedge clk);
      set_valid = 1'($urandom_range(0, 2) == 0);
      clr_valid = 1'($urandom_range(0, 3) == 0);
      set_idx   = 3'($urandom);
      clr_idx   = 3'($urandom);
      // small tag space so tags repeat; never store one tag twice
      set_tag   = laddr_t'($urandom_range(0, 15)) << 20 | laddr_t'(42'h3_0000_0000);
      foreach (rtag[i]) if (rval[i] && rtag[i] == set_tag && i != int'(set_idx)) set_valid = 0;
      snp_tag = ($urandom_range(0, 1) == 0) ? rtag[$urandom_range(0, ENTRIES-1)]
                                            : laddr_t'($urandom_range(0, 15)) << 20 | laddr_t'(42'h3_0000_0000);
      #1;
      begin
        bit eh; int ei; eh = 0; ei = 0;
        foreach (rtag[i]) if (rval[i] && rtag[i] == snp_tag) begin eh = 1; ei = i; end
        checks++;
        if (snp_hit !== eh || (eh && int'(snp_idx) != ei)) begin
          failures++;
          $display("snoop %h: hit %0d idx %0d, expected %0d %0d", snp_tag, snp_hit, snp_idx, eh, ei);
        end
      end
      @(posedge clk);
      if (clr_valid && !(set_valid && set_idx == clr_idx)) rval[clr_idx] = 0;
      if (set_valid) begin rval[set_idx] = 1; rtag[set_idx] = set_tag; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
