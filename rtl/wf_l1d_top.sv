// wf_l1d_top: write-filter (WF) cache in front of an STTRAM L1 data cache.
//
// STTRAM cells make a cheap, low-leakage L1 data cache, but every store
// costs a slow (4-cycle) and energy-hungry STTRAM write. A small, fully
// associative SRAM cache (the WF cache) between the core's load/store queue
// and the L1 absorbs repeated stores to the same lines: a store that hits in
// the WF cache is written there in one cycle and reaches the L1 only once,
// when the dirty line is later evicted from the WF cache. Lines enter the WF
// cache lazily, never on an L1 miss: under the WF_WR policy (the default)
// only an L1 store hit allocates the line, under WF_RD an L1 load hit does
// too. The WF cache is a strict subset of the L1. These policies, the
// latencies, the MESI bits, the duplicated snoop tags and the background
// write-back follow the write-filter design.
//
// Access flow (one request at a time; latency counted from the cycle the
// request is accepted to the cycle resp_valid is high):
//   WF hit, load or store                    : 1 cycle
//   WF miss, L1 hit, load (1 + RD_LAT)       : 3 cycles
//   WF miss, L1 hit, store (1 + WR_LAT)      : 5 cycles
//   L1 miss: the line is fetched from L2; the response is given when L2
//   answers and the block fill into L1 (WR_LAT cycles) runs in the background.
// Allocation into the WF cache happens in the cycle the L1 answers and does
// not delay the response. A dirty WF victim is held in a one-line write-back
// register and written to the L1 by its write engine in the background (4
// cycles); a clean victim is dropped. An access that needs the L1 line
// being written waits for the remaining cycles of that write.
//
// Coherence: every store also goes to L2 through the write buffer
// (write-through). A store that finds its line in state S (in the WF cache
// or the L1) sends an invalidation on snp_out and the line becomes M. An
// incoming invalidation (snp_in) clears the line in the WF cache, matched in
// its duplicate tags, and in the L1. A line evicted from the L1 by a fill is
// invalidated in the WF cache (inclusion); as L2 already holds every store,
// no data is lost even if that WF line was dirty.
//
// This design's own choices: one outstanding request; 64-bit word accesses;
// write-allocate store misses that respond once the L2 line is merged;
// snoops accepted only between requests; a second dirty victim waits until
// the write-back register is free; a line is refetched from L2 only after
// its queued write-through stores have drained.
module wf_l1d_top
  import wf_pkg::*;
#(
  parameter wf_policy_t  POLICY     = WF_WR,
  parameter int unsigned WF_ENTRIES = 8,
  parameter int unsigned L1_SETS    = 128,
  parameter int unsigned L1_WAYS    = 4,
  parameter int unsigned RD_LAT     = 2,
  parameter int unsigned WR_LAT     = 4,
  parameter int unsigned WBUF_DEPTH = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // load/store queue side
  input  logic        req_valid,
  output logic        req_ready,
  input  logic        req_we,        // 1 = store, 0 = load
  input  addr_t       req_addr,      // byte address, 8-byte aligned word
  input  word_t       req_wdata,
  input  be_t         req_be,
  output logic        resp_valid,
  output logic        resp_we,
  output word_t       resp_rdata,
  // snoop invalidations from the other cores
  input  logic        snp_in_valid,
  output logic        snp_in_ready,
  input  addr_t       snp_in_addr,
  // snoop invalidations to the other cores
  output logic        snp_out_valid,
  output addr_t       snp_out_addr,
  // line requests to L2
  output logic        l2_req_valid,
  input  logic        l2_req_ready,
  output laddr_t      l2_req_laddr,
  input  logic        l2_resp_valid,
  input  line_t       l2_resp_line,
  input  logic        l2_resp_shared,
  // write-through stores to L2
  output logic        l2_wr_valid,
  input  logic        l2_wr_ready,
  output wbuf_entry_t l2_wr_data
);

  localparam int unsigned IW = (WF_ENTRIES > 1) ? $clog2(WF_ENTRIES) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_L1_RD, S_L1_WR, S_ALLOC, S_L2_REQ, S_L2_WAIT, S_FILL
  } state_t;

  state_t state;

  // current request
  logic   q_we;
  laddr_t q_laddr;
  woff_t  q_woff;
  word_t  q_wdata;
  be_t    q_be;
  // line waiting for allocation or fill
  line_t  h_line;
  mesi_t  h_state;
  // write-back register for a dirty WF victim
  logic   wbk_pend;
  laddr_t wbk_laddr;
  line_t  wbk_line;
  mesi_t  wbk_state;

  laddr_t req_laddr;
  woff_t  req_woff;
  assign req_laddr = req_addr[ADDR_W-1:OFF_W];
  assign req_woff  = req_addr[OFF_W-1:3];

  // ------------------------------------------------------------ WF cache
  logic          wf_hit;
  logic [IW-1:0] wf_idx;
  word_t         wf_word;
  mesi_t         wf_state;
  logic          wf_acc, wf_alloc;
  laddr_t        wf_alloc_laddr;
  line_t         wf_alloc_line;
  mesi_t         wf_alloc_state;
  logic          wf_vic_wb;
  laddr_t        wf_vic_laddr;
  line_t         wf_vic_line;
  mesi_t         wf_vic_state;
  logic          wf_inv_hit, wf_snp_hit;

  // ------------------------------------------------------------------ L1
  logic    l1_rd_valid, l1_rd_ready, l1_rd_done, l1_rd_hit;
  line_t   l1_rd_line;
  mesi_t   l1_rd_state;
  logic    l1_wr_valid, l1_wr_ready, l1_wr_done, l1_wr_hit;
  l1_wop_t l1_wr_op;
  laddr_t  l1_wr_laddr;
  line_t   l1_wr_line, l1_wr_line_out;
  mesi_t   l1_wr_state, l1_wr_old_state;
  logic    l1_evict_valid;
  laddr_t  l1_evict_laddr;
  logic    l1_inv_hit;

  // -------------------------------------------------------- write buffer
  logic        wb_push, wb_push_ready, wb_probe_match, wb_empty;
  wbuf_entry_t wb_entry;

  // ------------------------------------------------------ control decode
  logic idle, take_snoop, hit_path, wbk_go, can_capture, alloc_want;
  logic ld_miss_go, st_miss_go, blocked;

  assign idle        = state == S_IDLE;
  assign take_snoop  = idle && snp_in_valid;
  assign hit_path    = idle && !snp_in_valid && req_valid && wf_hit;
  assign blocked     = wbk_pend && wbk_laddr == req_laddr;
  assign wbk_go      = wbk_pend && l1_wr_ready;
  assign can_capture = !wbk_pend || wbk_go;

  assign ld_miss_go  = idle && !snp_in_valid && req_valid && !wf_hit && !req_we && !blocked;
  assign st_miss_go  = idle && !snp_in_valid && req_valid && !wf_hit && req_we && !wbk_pend
                       && wb_push_ready;

  assign snp_in_ready = idle;

  always_comb begin
    req_ready = 1'b0;
    if (hit_path)        req_ready = !req_we || wb_push_ready;
    else if (ld_miss_go) req_ready = l1_rd_ready;
    else if (st_miss_go) req_ready = l1_wr_ready;
  end

  // WF accesses
  assign wf_acc = hit_path && req_ready;

  // L1 read port: load misses of the WF cache
  assign l1_rd_valid = ld_miss_go;

  // L1 write port: write-back first, then a store miss or a block fill
  always_comb begin
    l1_wr_valid = 1'b0;
    l1_wr_op    = L1W_WORD;
    l1_wr_laddr = req_laddr;
    l1_wr_line  = h_line;
    l1_wr_state = h_state;
    if (wbk_pend) begin
      l1_wr_valid = 1'b1;
      l1_wr_op    = L1W_LINE;
      l1_wr_laddr = wbk_laddr;
      l1_wr_line  = wbk_line;
      l1_wr_state = wbk_state;
    end else if (st_miss_go) begin
      l1_wr_valid = 1'b1;
    end else if (state == S_FILL) begin
      l1_wr_valid = 1'b1;
      l1_wr_op    = L1W_FILL;
      l1_wr_laddr = q_laddr;
    end
  end

  // allocation into the WF cache
  assign alloc_want = (state == S_L1_RD && l1_rd_done && l1_rd_hit && POLICY == WF_RD)
                      || (state == S_L1_WR && l1_wr_done && l1_wr_hit)
                      || state == S_ALLOC;
  assign wf_alloc       = alloc_want && (!wf_vic_wb || can_capture);
  assign wf_alloc_laddr = q_laddr;
  always_comb begin
    wf_alloc_line  = h_line;
    wf_alloc_state = h_state;
    if (state == S_L1_RD) begin
      wf_alloc_line  = l1_rd_line;
      wf_alloc_state = l1_rd_state;
    end else if (state == S_L1_WR) begin
      wf_alloc_line  = l1_wr_line_out;
      wf_alloc_state = MESI_M;
    end
  end

  // write-through stores
  assign wb_push           = (wf_acc && req_we) || (st_miss_go && l1_wr_ready);
  assign wb_entry.laddr    = req_laddr;
  assign wb_entry.woff     = req_woff;
  assign wb_entry.data     = req_wdata;
  assign wb_entry.be       = req_be;

  assign l2_req_valid = state == S_L2_REQ && !wb_probe_match;
  assign l2_req_laddr = q_laddr;

  // -------------------------------------------------------------- blocks
  wf_cache #(.ENTRIES(WF_ENTRIES)) u_wf (
    .clk, .rst_n,
    .lk_laddr      (idle ? req_laddr : q_laddr),
    .lk_woff       (idle ? req_woff : q_woff),
    .lk_hit        (wf_hit),
    .lk_idx        (wf_idx),
    .lk_word       (wf_word),
    .lk_state      (wf_state),
    .acc_valid     (wf_acc),
    .acc_we        (req_we),
    .acc_wdata     (req_wdata),
    .acc_be        (req_be),
    .alloc_valid   (wf_alloc),
    .alloc_laddr   (wf_alloc_laddr),
    .alloc_line    (wf_alloc_line),
    .alloc_state   (wf_alloc_state),
    .vic_writeback (wf_vic_wb),
    .vic_laddr     (wf_vic_laddr),
    .vic_line      (wf_vic_line),
    .vic_state     (wf_vic_state),
    .inv_valid     (l1_evict_valid),
    .inv_laddr     (l1_evict_laddr),
    .inv_hit       (wf_inv_hit),
    .snp_valid     (take_snoop),
    .snp_laddr     (snp_in_addr[ADDR_W-1:OFF_W]),
    .snp_hit       (wf_snp_hit)
  );

  stt_l1d #(.SETS(L1_SETS), .WAYS(L1_WAYS), .RD_LAT(RD_LAT), .WR_LAT(WR_LAT)) u_l1 (
    .clk, .rst_n,
    .rd_valid     (l1_rd_valid),
    .rd_ready     (l1_rd_ready),
    .rd_laddr     (req_laddr),
    .rd_done      (l1_rd_done),
    .rd_hit       (l1_rd_hit),
    .rd_line      (l1_rd_line),
    .rd_state     (l1_rd_state),
    .wr_valid     (l1_wr_valid),
    .wr_ready     (l1_wr_ready),
    .wr_op        (l1_wr_op),
    .wr_laddr     (l1_wr_laddr),
    .wr_woff      (req_woff),
    .wr_wdata     (req_wdata),
    .wr_be        (req_be),
    .wr_line      (l1_wr_line),
    .wr_state     (l1_wr_state),
    .wr_done      (l1_wr_done),
    .wr_hit       (l1_wr_hit),
    .wr_line_out  (l1_wr_line_out),
    .wr_old_state (l1_wr_old_state),
    .evict_valid  (l1_evict_valid),
    .evict_laddr  (l1_evict_laddr),
    .inv_valid    (take_snoop),
    .inv_laddr    (snp_in_addr[ADDR_W-1:OFF_W]),
    .inv_hit      (l1_inv_hit)
  );

  write_buffer #(.DEPTH(WBUF_DEPTH)) u_wbuf (
    .clk, .rst_n,
    .push_valid  (wb_push),
    .push_ready  (wb_push_ready),
    .push_data   (wb_entry),
    .pop_valid   (l2_wr_valid),
    .pop_ready   (l2_wr_ready),
    .pop_data    (l2_wr_data),
    .probe_laddr (q_laddr),
    .probe_match (wb_probe_match),
    .empty       (wb_empty)
  );

  // ---------------------------------------------------------- sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= S_IDLE;
      q_we          <= 1'b0;
      q_laddr       <= '0;
      q_woff        <= '0;
      q_wdata       <= '0;
      q_be          <= '0;
      h_line        <= '0;
      h_state       <= MESI_I;
      wbk_pend      <= 1'b0;
      wbk_laddr     <= '0;
      wbk_line      <= '0;
      wbk_state     <= MESI_I;
      resp_valid    <= 1'b0;
      resp_we       <= 1'b0;
      resp_rdata    <= '0;
      snp_out_valid <= 1'b0;
      snp_out_addr  <= '0;
    end else begin
      resp_valid    <= 1'b0;
      snp_out_valid <= 1'b0;

      // write-back register: issued to L1, then possibly refilled
      if (wbk_go) wbk_pend <= 1'b0;
      if (wf_alloc && wf_vic_wb) begin
        wbk_pend  <= 1'b1;
        wbk_laddr <= wf_vic_laddr;
        wbk_line  <= wf_vic_line;
        wbk_state <= wf_vic_state;
      end

      case (state)
        S_IDLE: begin
          if (req_valid && req_ready) begin
            q_we    <= req_we;
            q_laddr <= req_laddr;
            q_woff  <= req_woff;
            q_wdata <= req_wdata;
            q_be    <= req_be;
            if (hit_path) begin
              resp_valid <= 1'b1;
              resp_we    <= req_we;
              resp_rdata <= req_we ? '0 : wf_word;
              if (req_we && wf_state == MESI_S) begin
                snp_out_valid <= 1'b1;
                snp_out_addr  <= {req_laddr, OFF_W'(0)};
              end
            end else begin
              state <= req_we ? S_L1_WR : S_L1_RD;
            end
          end
        end

        S_L1_RD: if (l1_rd_done) begin
          if (l1_rd_hit) begin
            resp_valid <= 1'b1;
            resp_we    <= 1'b0;
            resp_rdata <= line_word(l1_rd_line, q_woff);
            h_line     <= l1_rd_line;
            h_state    <= l1_rd_state;
            state      <= (alloc_want && !wf_alloc) ? S_ALLOC : S_IDLE;
          end else begin
            state <= S_L2_REQ;
          end
        end

        S_L1_WR: if (l1_wr_done) begin
          if (l1_wr_hit) begin
            resp_valid <= 1'b1;
            resp_we    <= 1'b1;
            resp_rdata <= '0;
            h_line     <= l1_wr_line_out;
            h_state    <= MESI_M;
            if (l1_wr_old_state == MESI_S) begin
              snp_out_valid <= 1'b1;
              snp_out_addr  <= {q_laddr, OFF_W'(0)};
            end
            state <= (alloc_want && !wf_alloc) ? S_ALLOC : S_IDLE;
          end else begin
            state <= S_L2_REQ;
          end
        end

        S_ALLOC: if (wf_alloc) state <= S_IDLE;

        S_L2_REQ: if (l2_req_valid && l2_req_ready) state <= S_L2_WAIT;

        S_L2_WAIT: if (l2_resp_valid) begin
          resp_valid <= 1'b1;
          resp_we    <= q_we;
          resp_rdata <= q_we ? '0 : line_word(l2_resp_line, q_woff);
          if (q_we) begin
            h_line  <= merge_word(l2_resp_line, q_woff, q_wdata, q_be);
            h_state <= MESI_M;
            if (l2_resp_shared) begin
              snp_out_valid <= 1'b1;
              snp_out_addr  <= {q_laddr, OFF_W'(0)};
            end
          end else begin
            h_line  <= l2_resp_line;
            h_state <= l2_resp_shared ? MESI_S : MESI_E;
          end
          state <= S_FILL;
        end

        S_FILL: if (!wbk_pend && l1_wr_ready) state <= S_IDLE;

        default: state <= S_IDLE;
      endcase
    end
  end

  // ---------------------------------------------------------- assertions
  // The write-back register is never overwritten while still pending.
  a_wbk_no_loss: assert property (@(posedge clk) disable iff (!rst_n)
                                  (wf_alloc && wf_vic_wb) |-> can_capture);
  // A line is never allocated into the WF cache twice (during an
  // allocation the lookup port carries the allocated line address).
  a_no_dup_alloc: assert property (@(posedge clk) disable iff (!rst_n) wf_alloc |-> !wf_hit);
  // A store is never accepted when the write buffer cannot take it.
  a_wt_store: assert property (@(posedge clk) disable iff (!rst_n)
                               (req_valid && req_ready && req_we) |-> wb_push);

endmodule
