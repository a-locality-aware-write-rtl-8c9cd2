// wf_cache: the write-filter (WF) cache array.
//
// A small fully associative cache of 64-byte lines built from SRAM, placed
// between the core's load/store queue and the STTRAM L1 data cache. Each
// entry holds a 42-bit line tag, the line data, a valid bit, a dirty bit and
// a two-bit MESI state; replacement is LRU. All of this follows the
// write-filter design. A duplicate copy of the tags (wf_dup_tags) serves
// snoop invalidations.
//
// Interface and timing (all updates at the rising clock edge, lookups
// combinational, so a hit is answered in the cycle of the request):
//   lookup  : lk_laddr/lk_woff give lk_hit, lk_idx, the addressed word and
//             the line's MESI state.
//   access  : acc_valid commits a hit found by the lookup; a read only
//             refreshes LRU, a write merges the word under byte enables,
//             marks the line dirty and sets its state to M.
//   allocate: alloc_valid installs a clean line. The entry used is the first
//             invalid one, else the LRU one; the vic_* outputs show that
//             entry in the same cycle so the controller can write a dirty
//             victim back to L1 (a clean victim is dropped silently).
//   inv     : invalidation by line address from the L1 (strict inclusion:
//             a line evicted from L1 leaves the WF cache too).
//   snp     : invalidation by an other core's snoop message, matched in the
//             duplicate tags.
// The controller never allocates and invalidates in the same cycle; if it
// did, the invalidation would win.
module wf_cache
  import wf_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  // lookup
  input  laddr_t        lk_laddr,
  input  woff_t         lk_woff,
  output logic          lk_hit,
  output logic [IW-1:0] lk_idx,
  output word_t         lk_word,
  output mesi_t         lk_state,
  // access commit
  input  logic          acc_valid,
  input  logic          acc_we,
  input  word_t         acc_wdata,
  input  be_t           acc_be,
  // allocation
  input  logic          alloc_valid,
  input  laddr_t        alloc_laddr,
  input  line_t         alloc_line,
  input  mesi_t         alloc_state,
  output logic          vic_writeback,   // chosen entry is valid and dirty
  output laddr_t        vic_laddr,
  output line_t         vic_line,
  output mesi_t         vic_state,
  // inclusion invalidation from the L1
  input  logic          inv_valid,
  input  laddr_t        inv_laddr,
  output logic          inv_hit,
  // snoop invalidation from other cores
  input  logic          snp_valid,
  input  laddr_t        snp_laddr,
  output logic          snp_hit
);

  laddr_t             tags  [ENTRIES];
  line_t              data  [ENTRIES];
  mesi_t              state [ENTRIES];
  logic [ENTRIES-1:0] valid;
  logic [ENTRIES-1:0] dirty;

  // ---- lookup on the main tags
  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (valid[i] && tags[i] == lk_laddr) begin
        lk_hit = 1'b1;
        lk_idx = IW'(i);
      end
  end
  assign lk_word  = line_word(data[lk_idx], lk_woff);
  assign lk_state = state[lk_idx];

  // ---- inclusion invalidation lookup
  logic [IW-1:0] inv_idx;
  always_comb begin
    inv_hit = 1'b0;
    inv_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (valid[i] && tags[i] == inv_laddr) begin
        inv_hit = 1'b1;
        inv_idx = IW'(i);
      end
  end

  // ---- victim choice: first invalid entry, else LRU
  logic [IW-1:0] lru_victim, vic_idx;
  logic          have_free;
  always_comb begin
    have_free = 1'b0;
    vic_idx   = lru_victim;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (!valid[i]) begin
        have_free = 1'b1;
        vic_idx   = IW'(i);
      end
  end
  assign vic_writeback = !have_free && dirty[vic_idx];
  assign vic_laddr     = tags[vic_idx];
  assign vic_line      = data[vic_idx];
  assign vic_state     = state[vic_idx];

  // ---- duplicate tags for snoops
  logic [IW-1:0] snp_idx;
  logic          snp_match;
  wf_dup_tags #(.ENTRIES(ENTRIES)) u_dup (
    .clk, .rst_n,
    .set_valid (alloc_valid),
    .set_idx   (vic_idx),
    .set_tag   (alloc_laddr),
    .clr_valid ((snp_valid && snp_match) || (inv_valid && inv_hit)),
    .clr_idx   ((snp_valid && snp_match) ? snp_idx : inv_idx),
    .snp_tag   (snp_laddr),
    .snp_hit   (snp_match),
    .snp_idx   (snp_idx)
  );
  assign snp_hit = snp_valid && snp_match;

  // ---- LRU
  lru_sets #(.SETS(1), .WAYS(ENTRIES)) u_lru (
    .clk, .rst_n,
    .a_valid  (acc_valid),
    .a_set    (1'b0),
    .a_way    (lk_idx),
    .b_valid  (alloc_valid),
    .b_set    (1'b0),
    .b_way    (vic_idx),
    .q_set    (1'b0),
    .q_victim (lru_victim)
  );

  // ---- state update
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      dirty <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        tags[i]  <= '0;
        data[i]  <= '0;
        state[i] <= MESI_I;
      end
    end else begin
      if (acc_valid && acc_we) begin
        data[lk_idx]  <= merge_word(data[lk_idx], lk_woff, acc_wdata, acc_be);
        dirty[lk_idx] <= 1'b1;
        state[lk_idx] <= MESI_M;
      end
      if (alloc_valid) begin
        tags[vic_idx]  <= alloc_laddr;
        data[vic_idx]  <= alloc_line;
        state[vic_idx] <= alloc_state;
        valid[vic_idx] <= 1'b1;
        dirty[vic_idx] <= 1'b0;
      end
      if (inv_valid && inv_hit) begin
        valid[inv_idx] <= 1'b0;
        dirty[inv_idx] <= 1'b0;
        state[inv_idx] <= MESI_I;
      end
      if (snp_valid && snp_match) begin
        valid[snp_idx] <= 1'b0;
        dirty[snp_idx] <= 1'b0;
        state[snp_idx] <= MESI_I;
      end
    end
  end

endmodule
