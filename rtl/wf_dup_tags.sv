// wf_dup_tags: duplicated tag storage of the write-filter (WF) cache.
//
// A second copy of the WF cache's line tags and valid bits, kept in step
// with the main tags by the WF cache, so that an incoming snoop invalidation
// can be matched against the WF contents without occupying the core-side
// tag lookup. The duplicate copy is what the write-filter design proposes;
// its write interface is this design's own. Interface: one write port that
// sets (tag, valid) of an entry or clears a valid bit, and one combinational
// match port that returns whether, and in which entry, a snooped line
// address is present. Writes take effect at the next clock edge.
module wf_dup_tags
  import wf_pkg::*;
#(
  parameter int unsigned ENTRIES = 8,
  localparam int unsigned IW = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          set_valid,   // load entry set_idx with set_tag, valid
  input  logic [IW-1:0] set_idx,
  input  laddr_t        set_tag,
  input  logic          clr_valid,   // invalidate entry clr_idx
  input  logic [IW-1:0] clr_idx,
  input  laddr_t        snp_tag,     // snooped line address
  output logic          snp_hit,
  output logic [IW-1:0] snp_idx
);

  laddr_t            tags [ENTRIES];
  logic [ENTRIES-1:0] valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      for (int i = 0; i < ENTRIES; i++) tags[i] <= '0;
    end else begin
      if (set_valid) begin
        tags[set_idx]  <= set_tag;
        valid[set_idx] <= 1'b1;
      end
      if (clr_valid && !(set_valid && set_idx == clr_idx))
        valid[clr_idx] <= 1'b0;
    end
  end

  always_comb begin
    snp_hit = 1'b0;
    snp_idx = '0;
    for (int i = 0; i < ENTRIES; i++)
      if (valid[i] && tags[i] == snp_tag) begin
        snp_hit = 1'b1;
        snp_idx = IW'(i);
      end
  end

endmodule
