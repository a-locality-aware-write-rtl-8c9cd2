// tb_wf_rd_policy: end-to-end test of the write-filter cache subsystem with
// the WF_RD allocation policy (lines also enter the WF cache on L1 load hits).
//
// The testbench plays the core, the L2 and the other cores. The L2 is a
// behavioural model: a sparse line store whose untouched lines hold
// init_line(address), which answers line requests after L2_LAT cycles,
// reports some lines as shared, and applies the write-through stores it
// drains from the write buffer (with random back-pressure). A golden word
// memory, updated when each store is accepted, is the reference for every
// load.
//
// Directed part: checks the latencies of the design (WF hit 1 cycle, L1
// load hit 3, L1 store hit 5, a load held behind a background write-back of
// its own line 3 + 4), lazy allocation, snoop invalidations in and out, and
// inclusion. Random part: mixed loads, stores and snoops over lines that
// collide in a few L1 sets. Every mechanism of the design is counted and
// must occur at least once.
module tb_wf_rd_policy;
  import wf_pkg::*;

  localparam bit IS_RD  = 1'b1;     // policy of the instance below
  localparam int L2_LAT = 8;
  localparam int NWF    = 8;        // WF entries of the instance below

  logic        clk = 0, rst_n = 0;
  logic        req_valid, req_ready, req_we;
  addr_t       req_addr;
  word_t       req_wdata;
  be_t         req_be;
  logic        resp_valid, resp_we;
  word_t       resp_rdata;
  logic        snp_in_valid, snp_in_ready;
  addr_t       snp_in_addr;
  logic        snp_out_valid;
  addr_t       snp_out_addr;
  logic        l2_req_valid, l2_req_ready;
  laddr_t      l2_req_laddr;
  logic        l2_resp_valid;
  line_t       l2_resp_line;
  logic        l2_resp_shared;
  logic        l2_wr_valid, l2_wr_ready;
  wbuf_entry_t l2_wr_data;

  wf_l1d_top #(.POLICY(WF_RD)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL @%0t: %s", $time, what);
    end
  endtask

  // ---------------------------------------------------------------- L2 model
  line_t l2mem [laddr_t];

  function automatic line_t init_line(laddr_t a);
    line_t l;
    for (int w = 0; w < WORDS; w++)
      l[w*WORD_W +: WORD_W] = {a[31:0] ^ 32'h5EED_1234, 24'hC0FFEE, 8'(w)};
    return l;
  endfunction
  function automatic line_t l2_get(laddr_t a);
    return l2mem.exists(a) ? l2mem[a] : init_line(a);
  endfunction
  function automatic bit shared_of(laddr_t a);
    return (a % 5) == 2;
  endfunction

  bit     wr_ready_rand = 1;
  bit     wr_hold = 0;
  int     l2_reqs = 0;
  assign l2_req_ready = 1'b1;

  initial begin
    l2_resp_valid  = 0;
    l2_resp_line   = '0;
    l2_resp_shared = 0;
    forever begin
      @(posedge clk);
      if (rst_n && l2_req_valid && l2_req_ready) begin
        laddr_t a;
        a = l2_req_laddr;
        l2_reqs++;
        repeat (L2_LAT - 1) @(posedge clk);
        #1;
        l2_resp_valid  = 1;
        l2_resp_line   = l2_get(a);
        l2_resp_shared = shared_of(a);
        @(posedge clk);
        #1;
        l2_resp_valid  = 0;
      end
    end
  end

  // in the random phase L2 accepts a write-through store only one cycle in eight
  always @(negedge clk) l2_wr_ready <= wr_hold ? 1'b0 : wr_ready_rand ? 1'($urandom_range(0, 7) == 0) : 1'b1;
  always @(posedge clk)
    if (rst_n && l2_wr_valid && l2_wr_ready)
      l2mem[l2_wr_data.laddr] = merge_word(l2_get(l2_wr_data.laddr), l2_wr_data.woff,
                                           l2_wr_data.data, l2_wr_data.be);

  // ------------------------------------------------------------ golden model
  word_t gold [addr_t];
  function automatic word_t gold_get(laddr_t a, woff_t w);
    addr_t k = {a, w, 3'b000};
    return gold.exists(k) ? gold[k] : line_word(init_line(a), w);
  endfunction
  function automatic word_t be_merge(word_t old, word_t d, be_t be);
    word_t r = old;
    for (int b = 0; b < BE_W; b++) if (be[b]) r[b*8 +: 8] = d[b*8 +: 8];
    return r;
  endfunction

  // --------------------------------------------------------- snoop monitor
  addr_t snp_seen [$];
  always @(posedge clk) if (snp_out_valid) snp_seen.push_back(snp_out_addr);

  // ------------------------------------------------------ mechanism counts
  int n_wf_ld_hit, n_wf_st_hit, n_l1_ld_hit, n_l1_st_hit, n_l2_fill, n_alloc;
  int n_dirty_wb, n_clean_evict, n_rd_stall, n_snp_wf, n_snp_l1, n_snp_out;
  int n_incl, n_refetch_wait, n_wbuf_full, n_alloc_wait;
  always @(posedge clk) if (rst_n) begin
    if (dut.wf_acc && !dut.req_we) n_wf_ld_hit++;
    if (dut.wf_acc && dut.req_we)  n_wf_st_hit++;
    if (dut.l1_rd_done && dut.l1_rd_hit) n_l1_ld_hit++;
    if (dut.l1_wr_done && dut.l1_wr_hit && dut.u_l1.wr_op_q == L1W_WORD) n_l1_st_hit++;
    if (l2_req_valid && l2_req_ready) n_l2_fill++;
    if (dut.wf_alloc) n_alloc++;
    if (dut.l1_wr_done && dut.l1_wr_hit && dut.u_l1.wr_op_q == L1W_LINE) n_dirty_wb++;
    if (dut.wf_alloc && !dut.u_wf.have_free && !dut.wf_vic_wb) n_clean_evict++;
    if (dut.l1_rd_valid && !dut.l1_rd_ready) n_rd_stall++;
    if (dut.wf_snp_hit) n_snp_wf++;
    if (dut.l1_inv_hit) n_snp_l1++;
    if (snp_out_valid) n_snp_out++;
    if (dut.l1_evict_valid && dut.wf_inv_hit) n_incl++;
    if (int'(dut.state) == 4 && dut.wb_probe_match) n_refetch_wait++;
    if (!dut.wb_push_ready) n_wbuf_full++;
    if (int'(dut.state) == 3) n_alloc_wait++;
  end

  // ------------------------------------------------------------- core side
  // One access; lat counts cycles from the first cycle the request is
  // presented to the cycle resp_valid is high.
  task automatic access(bit we, laddr_t la, woff_t wo, word_t wd, be_t be, output int lat);
    word_t exp;
    @(negedge clk);
    req_valid = 1; req_we = we; req_addr = {la, wo, 3'b000}; req_wdata = wd; req_be = be;
    lat = 0;
    forever begin
      #1;
      lat++;
      if (req_ready) break;
      @(negedge clk);
    end
    exp = gold_get(la, wo);
    if (we) gold[{la, wo, 3'b000}] = be_merge(exp, wd, be);
    @(negedge clk);
    req_valid = 0;
    while (!resp_valid) begin
      @(negedge clk);
      lat++;
    end
    check(resp_we == we, "response kind");
    if (!we) begin
      check(resp_rdata == exp, $sformatf("load %h.%0d data %h expected %h", la, wo, resp_rdata, exp));
    end
  endtask

  task automatic load(laddr_t la, woff_t wo, output int lat);
    access(0, la, wo, '0, '0, lat);
  endtask
  task automatic store(laddr_t la, woff_t wo, word_t wd, output int lat);
    access(1, la, wo, wd, '1, lat);
  endtask

  task automatic snoop(laddr_t la);
    @(negedge clk);
    snp_in_valid = 1; snp_in_addr = {la, 6'b0};
    do begin #1; if (!snp_in_ready) @(negedge clk); end while (!snp_in_ready);
    @(negedge clk);
    snp_in_valid = 0;
  endtask

  task automatic settle(int n);
    repeat (n) @(negedge clk);
  endtask

  // line address in L1 set s with tag t
  function automatic laddr_t la_of(int t, int s);
    return laddr_t'((t << 7) | s);
  endfunction

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------------ test
  initial begin
    int lat, r0;
    laddr_t A, S, C, D;
    req_valid = 0; req_we = 0; req_addr = '0; req_wdata = '0; req_be = '0;
    snp_in_valid = 0; snp_in_addr = '0;
    wr_ready_rand = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // 1. cold load goes to L2; then L1 load hits take 1 + 2 cycles
    A = la_of(1, 3);
    r0 = l2_reqs;
    load(A, 2, lat);
    check(l2_reqs == r0 + 1, "cold load fetched from L2");
    settle(8);
    load(A, 2, lat);
    check(lat == 3, $sformatf("L1 load hit latency %0d, expected 3", lat));
    load(A, 5, lat);
    check(lat == (IS_RD ? 1 : 3), $sformatf("second load latency %0d (allocation on load hit only under WF_RD)", lat));

    // 2. first store: L1 store hit takes 1 + 4 cycles and allocates the line
    store(A, 1, 64'h1111_2222_3333_4444, lat);
    check(lat == (IS_RD ? 1 : 5), $sformatf("first store latency %0d", lat));
    store(A, 6, 64'hAAAA_BBBB_CCCC_DDDD, lat);
    check(lat == 1, $sformatf("WF store hit latency %0d, expected 1", lat));
    load(A, 1, lat);
    check(lat == 1, $sformatf("WF load hit latency %0d, expected 1", lat));

    // 3. fill the WF cache with NWF more store-allocated lines; A (dirty, LRU)
    //    is written back and a load of A waits for that write to finish
    for (int i = 0; i < NWF; i++) begin
      load(la_of(2 + i, 10 + i), 0, lat);
    end
    settle(8);
    for (int i = 0; i < NWF; i++) begin
      store(la_of(2 + i, 10 + i), 0, 64'(i) * 64'h0101_0101_0101_0101, lat);
      check(lat == 5, $sformatf("L1 store hit %0d latency %0d, expected 5", i, lat));
    end
    load(A, 1, lat);
    check(lat == 7, $sformatf("load behind write-back of its line: latency %0d, expected 3 + 4", lat));
    check(n_dirty_wb >= 1 || dut.u_l1.wr_busy, "dirty WF line written back to L1");

    // 4. store to a shared line sends an invalidation to the other cores
    S = la_of(40, 20);
    while (!shared_of(S)) S = S + 128;
    load(S, 0, lat);
    settle(8);
    snp_seen.delete();
    store(S, 0, 64'h5555_6666_7777_8888, lat);
    settle(2);
    check(snp_seen.size() == 1 && snp_seen[0] == {S, 6'b0}, "invalidation sent for store to shared line");

    // 5. an incoming invalidation removes a WF line; the next load refetches
    C = la_of(50, 30);
    load(C, 0, lat);
    settle(8);
    store(C, 3, 64'h0C0C_0C0C_0C0C_0C0C, lat);
    load(C, 3, lat);
    check(lat == 1, "line C in WF cache before the snoop");
    r0 = n_snp_wf;
    snoop(C);
    check(n_snp_wf == r0 + 1, "snoop hit in WF duplicate tags");
    settle(4);
    r0 = l2_reqs;
    load(C, 3, lat);
    check(l2_reqs == r0 + 1, "load after snoop invalidation refetched from L2");

    // 6. inclusion: evicting D from its L1 set also removes it from WF
    D = la_of(60, 40);
    load(D, 0, lat);
    settle(8);
    store(D, 0, 64'hD0D0_D0D0_D0D0_D0D0, lat);
    r0 = n_incl;
    for (int i = 1; i <= 4; i++) begin
      load(la_of(60 + i, 40), 0, lat);
      settle(8);
    end
    check(n_incl > r0, "L1 eviction invalidated the WF copy");
    r0 = l2_reqs;
    load(D, 0, lat);
    check(l2_reqs == r0 + 1, "evicted line refetched from L2");

    // 6b. L2 stops taking write-through stores: the write buffer fills and
    //     WF store hits are held until it drains
    wr_hold = 1;
    fork
      begin
        settle(60);
        wr_hold = 0;
      end
    join_none
    for (int i = 0; i < 12; i++) store(D, woff_t'(i), 64'hFEED_0000 + 64'(i), lat);
    check(n_wbuf_full > 0, "write buffer filled while L2 held off");
    load(D, 3, lat);

    // 7. random mix with L2 write back-pressure
    wr_ready_rand = 1;
    for (int it = 0; it < 6000; it++) begin
      laddr_t la;
      int k;
      la = la_of($urandom_range(100, 107), 50 + $urandom_range(0, 2) * 3);
      k  = $urandom_range(0, 99);
      if (k < 3) snoop(la);
      else if (k < 45) access(1, la, woff_t'($urandom), {$urandom, $urandom}, be_t'($urandom), lat);
      else load(la, woff_t'($urandom), lat);
    end

    // 8. drain and compare L2 with the golden memory
    wr_ready_rand = 0;
    settle(200);
    check(dut.wb_empty, "write buffer drained");
    foreach (gold[k]) begin
      check(line_word(l2_get(k[ADDR_W-1:OFF_W]), k[OFF_W-1:3]) == gold[k],
            $sformatf("L2 word %h", k));
    end

    // every mechanism must have happened
    check(n_wf_ld_hit > 0,    "WF load hit");
    check(n_wf_st_hit > 0,    "WF store hit");
    check(n_l1_ld_hit > 0,    "L1 load hit");
    check(n_l1_st_hit > 0,    "L1 store hit");
    check(n_l2_fill > 0,      "L2 line fill");
    check(n_alloc > 0,        "WF allocation");
    check(n_dirty_wb > 0,     "dirty write-back to L1");
    check(n_clean_evict > 0,  "silent clean eviction");
    check(n_rd_stall > 0,     "access held behind an L1 write");
    check(n_snp_wf > 0,       "snoop invalidation in WF");
    check(n_snp_l1 > 0,       "snoop invalidation in L1");
    check(n_snp_out > 0,      "invalidation sent to other cores");
    check(n_incl > 0,         "inclusion invalidation");
    check(n_refetch_wait > 0, "refetch waiting for write buffer");
    check(n_wbuf_full > 0,    "write buffer full");
    $display("mechanisms: wf_ld_hit=%0d wf_st_hit=%0d l1_ld_hit=%0d l1_st_hit=%0d l2_fill=%0d alloc=%0d dirty_wb=%0d clean_evict=%0d rd_stall=%0d snp_wf=%0d snp_l1=%0d snp_out=%0d incl=%0d refetch_wait=%0d wbuf_full=%0d alloc_wait=%0d",
             n_wf_ld_hit, n_wf_st_hit, n_l1_ld_hit, n_l1_st_hit, n_l2_fill, n_alloc, n_dirty_wb,
             n_clean_evict, n_rd_stall, n_snp_wf, n_snp_l1, n_snp_out, n_incl, n_refetch_wait,
             n_wbuf_full, n_alloc_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
