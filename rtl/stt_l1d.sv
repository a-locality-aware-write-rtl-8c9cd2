// stt_l1d: STTRAM-based L1 data cache with separate read and write engines.
//
// A 32 KB, 4-way set-associative cache of 64-byte lines with LRU
// replacement (128 sets), whose data array stands for STTRAM cells: a read
// takes RD_LAT = 2 cycles and any write takes WR_LAT = 4 cycles. Size,
// associativity, replacement and the two latencies follow the write-filter
// design's evaluation setup; everything about the engines is this design's
// own. Each line has a valid bit and a two-bit MESI state in the tag array.
//
// The read engine and the write engine work side by side. A write (a store
// word, a dirty-line write-back from the WF cache, or a block fill from L2)
// occupies the write engine for WR_LAT cycles and may run in the background
// while reads of other lines proceed; a read of the line being written is
// held off (rd_ready low) until the write ends, so it is delayed by exactly
// the write's remaining cycles.
//
// Read port : rd_valid && rd_ready in cycle t starts a read of line
//             rd_laddr; in cycle t+RD_LAT rd_done is high with rd_hit, the
//             line and its MESI state.
// Write port: wr_valid && wr_ready in cycle t starts operation wr_op.
//             The tags are checked at acceptance. A store word or line
//             write-back that misses ends with wr_done (wr_hit low) at t+1
//             and changes nothing. Otherwise wr_done is high at t+WR_LAT and
//             the data array is written at the end of that cycle. A store
//             word sets the state to M and returns the merged line and the
//             old state; a line write-back writes the line and the given
//             state; a fill picks a victim way (first invalid, else LRU),
//             installs tag, valid and state at acceptance and reports the
//             replaced line on evict_valid/evict_laddr in the acceptance
//             cycle, so the WF cache can drop it (strict inclusion).
// Snoop     : inv_valid clears the valid bit of line inv_laddr at the next
//             edge.
// No line is ever dirty with respect to L2, because stores are also sent
// to L2 through the write buffer (write-through), so an evicted line is
// dropped.
module stt_l1d
  import wf_pkg::*;
#(
  parameter int unsigned SETS   = 128,
  parameter int unsigned WAYS   = 4,
  parameter int unsigned RD_LAT = 2,
  parameter int unsigned WR_LAT = 4,
  localparam int unsigned SW    = $clog2(SETS),
  localparam int unsigned WW    = $clog2(WAYS),
  localparam int unsigned TAG_W = LADDR_W - SW
) (
  input  logic    clk,
  input  logic    rst_n,
  // read port
  input  logic    rd_valid,
  output logic    rd_ready,
  input  laddr_t  rd_laddr,
  output logic    rd_done,
  output logic    rd_hit,
  output line_t   rd_line,
  output mesi_t   rd_state,
  // write port
  input  logic    wr_valid,
  output logic    wr_ready,
  input  l1_wop_t wr_op,
  input  laddr_t  wr_laddr,
  input  woff_t   wr_woff,
  input  word_t   wr_wdata,
  input  be_t     wr_be,
  input  line_t   wr_line,
  input  mesi_t   wr_state,
  output logic    wr_done,
  output logic    wr_hit,
  output line_t   wr_line_out,
  output mesi_t   wr_old_state,
  output logic    evict_valid,
  output laddr_t  evict_laddr,
  // snoop invalidation
  input  logic    inv_valid,
  input  laddr_t  inv_laddr,
  output logic    inv_hit
);

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [SW-1:0]    set_t;
  typedef logic [WW-1:0]    way_t;

  // Arrays indexed by {set, way}. Only the valid bits are reset; the tag
  // and state of an invalid line are never used.
  localparam int unsigned LINES = SETS * WAYS;
  typedef logic [SW+WW-1:0] idx_t;

  tag_t              tags  [LINES];
  mesi_t             state [LINES];
  line_t             data  [LINES];
  logic [LINES-1:0]  valid;

  function automatic set_t set_of(laddr_t a);
    return a[SW-1:0];
  endfunction
  function automatic tag_t tag_of(laddr_t a);
    return a[LADDR_W-1:SW];
  endfunction
  function automatic idx_t idx_of(laddr_t a, logic [WW-1:0] w);
    return {a[SW-1:0], w};
  endfunction

  // ---------------------------------------------------------------- read
  logic   rd_busy;
  logic [$clog2(RD_LAT+1)-1:0] rd_cnt;
  laddr_t rd_q;
  logic   rd_accept;
  way_t   rd_way;

  // write-engine registers (declared here for the conflict check)
  logic    wr_busy;
  logic [$clog2(WR_LAT+1)-1:0] wr_cnt, wr_len;
  l1_wop_t wr_op_q;
  laddr_t  wr_q;
  woff_t   wr_woff_q;
  word_t   wr_wdata_q;
  be_t     wr_be_q;
  line_t   wr_line_q;
  mesi_t   wr_state_q;
  way_t    wr_way_q;
  logic    wr_hit_q;

  assign rd_ready  = !rd_busy
                     && !(wr_busy && wr_q == rd_laddr)
                     && !(wr_valid && wr_laddr == rd_laddr);
  assign rd_accept = rd_valid && rd_ready;
  assign rd_done   = rd_busy && rd_cnt == ($bits(rd_cnt))'(RD_LAT);

  always_comb begin
    rd_hit = 1'b0;
    rd_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[idx_of(rd_q, way_t'(w))] && tags[idx_of(rd_q, way_t'(w))] == tag_of(rd_q)) begin
        rd_hit = rd_done;
        rd_way = way_t'(w);
      end
  end
  assign rd_line  = data[idx_of(rd_q, rd_way)];
  assign rd_state = state[idx_of(rd_q, rd_way)];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_busy <= 1'b0;
      rd_cnt  <= '0;
      rd_q    <= '0;
    end else if (rd_accept) begin
      rd_busy <= 1'b1;
      rd_cnt  <= 1;
      rd_q    <= rd_laddr;
    end else if (rd_done) begin
      rd_busy <= 1'b0;
    end else if (rd_busy) begin
      rd_cnt <= rd_cnt + 1'b1;
    end
  end

  // --------------------------------------------------------------- write
  logic wr_accept;
  logic acc_hit;
  way_t acc_way;
  logic acc_free;
  way_t acc_free_way, lru_victim, fill_way;

  assign wr_ready  = !wr_busy && !(rd_busy && rd_q == wr_laddr);
  assign wr_accept = wr_valid && wr_ready;
  assign wr_done   = wr_busy && wr_cnt == wr_len;

  always_comb begin
    acc_hit      = 1'b0;
    acc_way      = '0;
    acc_free     = 1'b0;
    acc_free_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[idx_of(wr_laddr, way_t'(w))] && tags[idx_of(wr_laddr, way_t'(w))] == tag_of(wr_laddr)) begin
        acc_hit = 1'b1;
        acc_way = way_t'(w);
      end
    for (int w = WAYS - 1; w >= 0; w--)
      if (!valid[idx_of(wr_laddr, way_t'(w))]) begin
        acc_free     = 1'b1;
        acc_free_way = way_t'(w);
      end
  end
  assign fill_way    = acc_free ? acc_free_way : lru_victim;
  assign evict_valid = wr_accept && wr_op == L1W_FILL && !acc_free;
  assign evict_laddr = {tags[idx_of(wr_laddr, fill_way)], set_of(wr_laddr)};

  // result of the operation in its last cycle
  logic still_there;
  assign still_there  = valid[idx_of(wr_q, wr_way_q)]
                        && tags[idx_of(wr_q, wr_way_q)] == tag_of(wr_q);
  assign wr_hit       = wr_done && wr_hit_q && (wr_op_q == L1W_FILL || still_there);
  assign wr_line_out  = merge_word(data[idx_of(wr_q, wr_way_q)], wr_woff_q, wr_wdata_q, wr_be_q);
  assign wr_old_state = state[idx_of(wr_q, wr_way_q)];

  // ---------------------------------------------------------------- snoop
  way_t inv_way;
  always_comb begin
    inv_hit = 1'b0;
    inv_way = '0;
    for (int w = 0; w < WAYS; w++)
      if (valid[idx_of(inv_laddr, way_t'(w))] && tags[idx_of(inv_laddr, way_t'(w))] == tag_of(inv_laddr)) begin
        inv_hit = inv_valid;
        inv_way = way_t'(w);
      end
  end

  // ------------------------------------------------------------------ LRU
  lru_sets #(.SETS(SETS), .WAYS(WAYS)) u_lru (
    .clk, .rst_n,
    .a_valid  (rd_hit),
    .a_set    (set_of(rd_q)),
    .a_way    (rd_way),
    .b_valid  ((wr_accept && wr_op == L1W_FILL) || (wr_hit && wr_op_q == L1W_WORD)),
    .b_set    (wr_accept ? set_of(wr_laddr) : set_of(wr_q)),
    .b_way    (wr_accept ? fill_way : wr_way_q),
    .q_set    (set_of(wr_laddr)),
    .q_victim (lru_victim)
  );

  // ------------------------------------------------- write engine and tags
  // One write per cycle into each array: tags at fill acceptance, state at
  // fill acceptance or at the end of a store word or line write-back (never
  // in the same cycle), data at the end of an operation.
  logic  st_we;
  idx_t  st_idx;
  mesi_t st_val;
  always_comb begin
    st_we  = 1'b0;
    st_idx = idx_of(wr_q, wr_way_q);
    st_val = wr_state_q;
    if (wr_accept && wr_op == L1W_FILL) begin
      st_we  = 1'b1;
      st_idx = idx_of(wr_laddr, fill_way);
      st_val = wr_state;
    end else if (wr_hit && wr_op_q == L1W_WORD) begin
      st_we  = 1'b1;
      st_val = MESI_M;
    end else if (wr_hit && wr_op_q == L1W_LINE) begin
      st_we  = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy    <= 1'b0;
      wr_cnt     <= '0;
      wr_len     <= '0;
      wr_op_q    <= L1W_WORD;
      wr_q       <= '0;
      wr_woff_q  <= '0;
      wr_wdata_q <= '0;
      wr_be_q    <= '0;
      wr_line_q  <= '0;
      wr_state_q <= MESI_I;
      wr_way_q   <= '0;
      wr_hit_q   <= 1'b0;
      valid      <= '0;
    end else begin
      if (wr_accept) begin
        wr_busy    <= 1'b1;
        wr_cnt     <= 1;
        wr_op_q    <= wr_op;
        wr_q       <= wr_laddr;
        wr_woff_q  <= wr_woff;
        wr_wdata_q <= wr_wdata;
        wr_be_q    <= wr_be;
        wr_line_q  <= wr_line;
        wr_state_q <= wr_state;
        if (wr_op == L1W_FILL) begin
          wr_way_q <= fill_way;
          wr_hit_q <= 1'b1;
          wr_len   <= ($bits(wr_len))'(WR_LAT);
          valid[idx_of(wr_laddr, fill_way)] <= 1'b1;
        end else begin
          wr_way_q <= acc_way;
          wr_hit_q <= acc_hit;
          wr_len   <= acc_hit ? ($bits(wr_len))'(WR_LAT) : ($bits(wr_len))'(1);
        end
      end else if (wr_done) begin
        wr_busy <= 1'b0;
      end else if (wr_busy) begin
        wr_cnt <= wr_cnt + 1'b1;
      end
      // snoop invalidation (applied last)
      if (inv_hit) valid[idx_of(inv_laddr, inv_way)] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (wr_accept && wr_op == L1W_FILL) tags[idx_of(wr_laddr, fill_way)] <= tag_of(wr_laddr);
    if (st_we) state[st_idx] <= st_val;
  end

  // data array: one write per cycle, at the end of a write operation
  always_ff @(posedge clk) begin
    if (wr_hit) data[idx_of(wr_q, wr_way_q)] <= (wr_op_q == L1W_WORD) ? wr_line_out : wr_line_q;
  end

  // A block fill is only issued for a line that is not resident.
  a_fill_absent: assert property (@(posedge clk) disable iff (!rst_n)
                                  (wr_accept && wr_op == L1W_FILL) |-> !acc_hit);

endmodule
