// tb_wf_cache: self-checking test of the write-filter cache array.
//
// A 4-entry instance receives a random stream of lookups with read or write
// commits, allocations of new lines, inclusion invalidations and snoop
// invalidations. A reference model (tags, data, valid, dirty, MESI state
// and a recency list) predicts every lookup result and, before each
// allocation, which entry is replaced and whether it must be written back:
// a free entry first, else the least recently used one; clean victims are
// dropped silently.
module tb_wf_cache;
  import wf_pkg::*;
  localparam int N = 4;

  logic clk = 0, rst_n = 0;
  laddr_t lk_laddr, alloc_laddr, inv_laddr, snp_laddr, vic_laddr;
  woff_t lk_woff;
  logic lk_hit, acc_valid, acc_we, alloc_valid, vic_writeback, inv_valid, inv_hit, snp_valid, snp_hit;
  logic [1:0] lk_idx;
  word_t lk_word, acc_wdata;
  be_t acc_be;
  mesi_t lk_state, alloc_state, vic_state;
  line_t alloc_line, vic_line;

  wf_cache #(.ENTRIES(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_dirty_vic = 0, n_clean_vic = 0, n_snp = 0, n_inv = 0, n_wr = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  laddr_t rt [N];
  line_t  rd [N];
  bit     rv [N], rdirty [N];
  mesi_t  rs [N];
  int     order [$];

  function automatic int find(laddr_t a);
    for (int i = 0; i < N; i++) if (rv[i] && rt[i] == a) return i;
    return -1;
  endfunction
  function automatic void touch(int i);
    foreach (order[k]) if (order[k] == i) begin order.delete(k); break; end
    order.push_front(i);
  endfunction
  function automatic int victim();
    for (int i = 0; i < N; i++) if (!rv[i]) return i;
    return order[N-1];
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    lk_laddr = '0; lk_woff = '0; acc_valid = 0; acc_we = 0; acc_wdata = '0; acc_be = '0;
    alloc_valid = 0; alloc_laddr = '0; alloc_line = '0; alloc_state = MESI_I;
    inv_valid = 0; inv_laddr = '0; snp_valid = 0; snp_laddr = '0;
    for (int i = 0; i < N; i++) begin rv[i] = 0; rdirty[i] = 0; rt[i] = '0; rd[i] = '0; rs[i] = MESI_I; order.push_back(i); end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 5000; it++) begin
      int k, e, v;
      laddr_t a;
      @(negedge clk);
      acc_valid = 0; alloc_valid = 0; inv_valid = 0; snp_valid = 0;
      a = laddr_t'($urandom_range(0, 9)) * 42'h1_0001;
      lk_laddr = a; lk_woff = woff_t'($urandom);
      k = $urandom_range(0, 99);
      #1;
      e = find(a);
      check(lk_hit == (e >= 0), $sformatf("lookup %h hit %0d", a, lk_hit));
      if (e >= 0) begin
        check(int'(lk_idx) == e, "lookup entry");
        check(lk_word == line_word(rd[e], lk_woff), "lookup word");
        check(lk_state == rs[e], "lookup state");
      end
      if (e >= 0 && k < 50) begin
        acc_valid = 1; acc_we = 1'($urandom_range(0, 1));
        acc_wdata = {$urandom, $urandom}; acc_be = be_t'($urandom);
      end else if (e < 0 && k < 75) begin
        alloc_valid = 1; alloc_laddr = a; alloc_line = {16{$urandom}};
        alloc_state = mesi_t'($urandom_range(1, 3));
        #1;
        v = victim();
        check(vic_writeback == (rv[v] && rdirty[v]), $sformatf("victim %0d writeback flag", v));
        if (rv[v] && rdirty[v]) begin
          check(vic_laddr == rt[v] && vic_line == rd[v] && vic_state == rs[v], "dirty victim contents");
          n_dirty_vic++;
        end else if (rv[v]) n_clean_vic++;
      end else if (k < 88) begin
        inv_valid = 1; inv_laddr = a;
        #1 check(inv_hit == (e >= 0), "inclusion invalidation hit");
      end else begin
        snp_valid = 1; snp_laddr = a;
        #1 check(snp_hit == (e >= 0), "snoop hit in duplicate tags");
      end
      @(posedge clk);
      if (acc_valid) begin
        touch(e);
        if (acc_we) begin rd[e] = merge_word(rd[e], lk_woff, acc_wdata, acc_be); rdirty[e] = 1; rs[e] = MESI_M; n_wr++; end
      end
      if (alloc_valid) begin
        v = victim();
        rt[v] = alloc_laddr; rd[v] = alloc_line; rs[v] = alloc_state; rv[v] = 1; rdirty[v] = 0;
        touch(v);
      end
      if (inv_valid && e >= 0) begin rv[e] = 0; n_inv++; end
      if (snp_valid && e >= 0) begin rv[e] = 0; n_snp++; end
    end
    check(n_dirty_vic > 0 && n_clean_vic > 0 && n_inv > 0 && n_snp > 0 && n_wr > 0, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
