// tb_stt_l1d: self-checking test of the STTRAM L1 data cache model.
//
// A 4-set, 2-way instance with the default latencies (read 2 cycles, write
// 4 cycles) is driven through its read and write ports. Checked: read miss
// and hit timing and data, block fill with free-way and LRU victim choice
// and the eviction report, store-word merge with state change to M and the
// returned old state, a store-word miss ending after one cycle, a line
// write-back, a read held off exactly for the remaining cycles of a write to
// its line while a read of another line proceeds, and snoop invalidation.
// A random phase then runs reads, fills, store words, line write-backs and
// invalidations one at a time against a reference of every way's tag, data,
// state and the recency order of each set.
module tb_stt_l1d;
  import wf_pkg::*;
  localparam int SETS = 4, WAYS = 2, RD_LAT = 2, WR_LAT = 4;

  logic clk = 0, rst_n = 0;
  logic rd_valid, rd_ready, rd_done, rd_hit;
  laddr_t rd_laddr;
  line_t rd_line;
  mesi_t rd_state;
  logic wr_valid, wr_ready, wr_done, wr_hit, evict_valid, inv_valid, inv_hit;
  l1_wop_t wr_op;
  laddr_t wr_laddr, evict_laddr, inv_laddr;
  woff_t wr_woff;
  word_t wr_wdata;
  be_t wr_be;
  line_t wr_line, wr_line_out;
  mesi_t wr_state, wr_old_state;

  stt_l1d #(.SETS(SETS), .WAYS(WAYS), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  function automatic line_t mk_line(int seed);
    line_t l;
    for (int w = 0; w < WORDS; w++) l[w*WORD_W +: WORD_W] = {32'(seed), 32'(w * 7 + 1)};
    return l;
  endfunction

  // read: returns cycles from request to done (1 = accepted at once, done
  // RD_LAT cycles later gives RD_LAT)
  task automatic rd(laddr_t a, bit eh, line_t el, mesi_t es, int ewait, string what);
    int wait_c, lat;
    @(negedge clk);
    rd_valid = 1; rd_laddr = a;
    wait_c = 0;
    #1;
    while (!rd_ready) begin @(negedge clk); #1; wait_c++; end
    @(negedge clk);
    rd_valid = 0;
    lat = 1;
    #1;
    while (!rd_done) begin @(negedge clk); #1; lat++; end
    check(wait_c == ewait, $sformatf("%s: waited %0d cycles, expected %0d", what, wait_c, ewait));
    check(lat == RD_LAT, $sformatf("%s: read latency %0d", what, lat));
    check(rd_hit == eh, $sformatf("%s: hit %0d", what, rd_hit));
    if (eh) begin
      check(rd_line == el, $sformatf("%s: line data", what));
      check(rd_state == es, $sformatf("%s: state %s", what, rd_state.name()));
    end
  endtask

  // start a write; returns once accepted (evict outputs checked then)
  task automatic wr_start(l1_wop_t op, laddr_t a, line_t l, mesi_t st, woff_t wo, word_t d,
                          bit eev, laddr_t eaddr, string what);
    @(negedge clk);
    wr_valid = 1; wr_op = op; wr_laddr = a; wr_line = l; wr_state = st;
    wr_woff = wo; wr_wdata = d; wr_be = '1;
    #1;
    while (!wr_ready) begin @(negedge clk); #1; end
    check(evict_valid == eev, $sformatf("%s: evict_valid %0d", what, evict_valid));
    if (eev) check(evict_laddr == eaddr, $sformatf("%s: evicted %h", what, evict_laddr));
    @(negedge clk);
    wr_valid = 0;
  endtask

  task automatic wr_finish(int elat, bit eh, string what);
    int lat = 1;
    #1;
    while (!wr_done) begin @(negedge clk); #1; lat++; end
    check(lat == elat, $sformatf("%s: write latency %0d expected %0d", what, lat, elat));
    check(wr_hit == eh, $sformatf("%s: hit %0d", what, wr_hit));
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference of the array contents for the random phase
  bit     mv [SETS][WAYS];
  laddr_t mt [SETS][WAYS];
  line_t  md [SETS][WAYS];
  mesi_t  ms [SETS][WAYS];
  int     mo [SETS][$];    // recency order, most recent first

  function automatic int mfind(laddr_t a);
    int s = int'(a) % SETS;
    for (int w = 0; w < WAYS; w++) if (mv[s][w] && mt[s][w] == a) return w;
    return -1;
  endfunction
  function automatic void mtouch(int s, int w);
    foreach (mo[s][k]) if (mo[s][k] == w) begin mo[s].delete(k); break; end
    mo[s].push_front(w);
  endfunction
  function automatic int mvictim(int s);
    for (int w = 0; w < WAYS; w++) if (!mv[s][w]) return w;
    return mo[s][WAYS-1];
  endfunction

  initial begin
    laddr_t A, B, C, E;
    line_t  m;
    A = laddr_t'(42'h100 + 1);  // set 1
    B = laddr_t'(42'h200 + 1);
    C = laddr_t'(42'h300 + 1);
    E = laddr_t'(42'h400 + 2);  // set 2
    rd_valid = 0; wr_valid = 0; inv_valid = 0; rd_laddr = '0; wr_laddr = '0; inv_laddr = '0;
    wr_op = L1W_WORD; wr_line = '0; wr_state = MESI_I; wr_woff = '0; wr_wdata = '0; wr_be = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;

    rd(A, 0, '0, MESI_I, 0, "cold read");
    wr_start(L1W_FILL, A, mk_line(1), MESI_E, 0, 0, 0, '0, "fill A");
    // read of A while its fill is in progress: held for the remaining cycles
    rd(A, 1, mk_line(1), MESI_E, WR_LAT - 1, "read behind fill");
    wr_start(L1W_WORD, A, '0, MESI_I, 3, 64'hDEAD_BEEF_0123_4567, 0, '0, "store A");
    wr_finish(WR_LAT, 1, "store A");
    check(wr_old_state == MESI_E, "store returns old state E");
    m = merge_word(mk_line(1), 3, 64'hDEAD_BEEF_0123_4567, '1);
    check(wr_line_out == m, "store returns merged line");
    @(negedge clk);
    rd(A, 1, m, MESI_M, 0, "read after store");
    wr_start(L1W_WORD, E, '0, MESI_I, 0, 64'h1, 0, '0, "store miss");
    wr_finish(1, 0, "store miss");
    wr_start(L1W_LINE, A, mk_line(9), MESI_S, 0, 0, 0, '0, "line write-back");
    wr_finish(WR_LAT, 1, "line write-back");
    @(negedge clk);
    rd(A, 1, mk_line(9), MESI_S, 0, "read after write-back");
    // second way of set 1, then a third line evicts the LRU (A)
    wr_start(L1W_FILL, B, mk_line(2), MESI_S, 0, 0, 0, '0, "fill B");
    wr_finish(WR_LAT, 1, "fill B");
    // a read of another line runs while the write engine is busy
    wr_start(L1W_FILL, C, mk_line(3), MESI_E, 0, 0, 1, A, "fill C evicts A");
    rd(B, 1, mk_line(2), MESI_S, 0, "read B beside fill of C");
    wr_finish(WR_LAT - RD_LAT - 1, 1, "fill C");
    rd(A, 0, '0, MESI_I, 0, "A gone");
    rd(C, 1, mk_line(3), MESI_E, 0, "C present");
    // snoop invalidation
    @(negedge clk);
    inv_valid = 1; inv_laddr = B;
    #1 check(inv_hit == 1, "snoop hits B");
    @(negedge clk);
    inv_valid = 0;
    rd(B, 0, '0, MESI_I, 0, "B invalidated");
    rd(C, 1, mk_line(3), MESI_E, 0, "C untouched by snoop");
    // ---- random phase: start from an empty cache
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    for (int st = 0; st < SETS; st++) begin
      mo[st].delete();
      for (int w = 0; w < WAYS; w++) begin mv[st][w] = 0; mo[st].push_back(w); end
    end
    for (int it = 0; it < 1500; it++) begin
      laddr_t a;
      int k, st, w, v;
      line_t l;
      a  = laddr_t'($urandom_range(0, 4) * SETS + $urandom_range(0, SETS - 1) + 64);
      st = int'(a) % SETS;
      w  = mfind(a);
      k  = $urandom_range(0, 99);
      l  = {16{$urandom}};
      if (k < 30) begin
        rd(a, w >= 0, (w >= 0) ? md[st][w] : '0, (w >= 0) ? ms[st][w] : MESI_I, 0, "random read");
        if (w >= 0) mtouch(st, w);
      end else if (k < 55 && w < 0) begin
        v = mvictim(st);
        wr_start(L1W_FILL, a, l, MESI_E, 0, 0, mv[st][v], mt[st][v], "random fill");
        wr_finish(WR_LAT, 1, "random fill");
        mv[st][v] = 1; mt[st][v] = a; md[st][v] = l; ms[st][v] = MESI_E;
        mtouch(st, v);
      end else if (k < 75) begin
        word_t d;
        woff_t o;
        d = {$urandom, $urandom};
        o = woff_t'($urandom);
        wr_start(L1W_WORD, a, '0, MESI_I, o, d, 0, '0, "random store");
        wr_finish((w >= 0) ? WR_LAT : 1, w >= 0, "random store");
        if (w >= 0) begin
          check(wr_old_state == ms[st][w], "random store old state");
          md[st][w] = merge_word(md[st][w], o, d, '1);
          check(wr_line_out == md[st][w], "random store merged line");
          ms[st][w] = MESI_M;
          mtouch(st, w);
        end
      end else if (k < 90) begin
        wr_start(L1W_LINE, a, l, MESI_S, 0, 0, 0, '0, "random write-back");
        wr_finish((w >= 0) ? WR_LAT : 1, w >= 0, "random write-back");
        if (w >= 0) begin md[st][w] = l; ms[st][w] = MESI_S; end
      end else begin
        @(negedge clk);
        inv_valid = 1; inv_laddr = a;
        #1 check(inv_hit == (w >= 0), "random snoop hit");
        @(negedge clk);
        inv_valid = 0;
        if (w >= 0) mv[st][w] = 0;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
