// wf_pkg: types and constants shared by the write-filter (WF) cache subsystem.
//
// Addresses are 48-bit physical byte addresses and cache lines are 64 bytes,
// so a line address (the WF tag) is 42 bits, as the write-filter design
// states. The core-side access width is one 64-bit word with byte enables;
// that width is this design's own choice. Coherence state is MESI in two
// bits per line. The allocation policies are WF_RD (allocate a line into the
// WF cache on an L1 load hit or store hit) and WF_WR (allocate only on an L1
// store hit); neither allocates on an L1 miss.
package wf_pkg;

  localparam int unsigned ADDR_W     = 48;                   // physical address bits
  localparam int unsigned LINE_BYTES = 64;                   // line size in bytes
  localparam int unsigned OFF_W      = $clog2(LINE_BYTES);   // byte offset in a line
  localparam int unsigned LADDR_W    = ADDR_W - OFF_W;       // line address = WF tag (42)
  localparam int unsigned WORD_W     = 64;                   // core access width
  localparam int unsigned BE_W       = WORD_W / 8;
  localparam int unsigned WORDS      = LINE_BYTES * 8 / WORD_W;
  localparam int unsigned WOFF_W     = $clog2(WORDS);
  localparam int unsigned LINE_W     = LINE_BYTES * 8;

  typedef logic [ADDR_W-1:0]  addr_t;
  typedef logic [LADDR_W-1:0] laddr_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [BE_W-1:0]    be_t;
  typedef logic [WOFF_W-1:0]  woff_t;
  typedef logic [LINE_W-1:0]  line_t;

  // MESI coherence state, two bits per line.
  typedef enum logic [1:0] {
    MESI_I = 2'd0,
    MESI_S = 2'd1,
    MESI_E = 2'd2,
    MESI_M = 2'd3
  } mesi_t;

  // WF line allocation policy.
  typedef enum logic {
    WF_RD = 1'b0,   // allocate on L1 load hit and L1 store hit
    WF_WR = 1'b1    // allocate on L1 store hit only
  } wf_policy_t;

  // Operations of the L1 write engine.
  typedef enum logic [1:0] {
    L1W_WORD = 2'd0,   // store of one word into a resident line
    L1W_LINE = 2'd1,   // write-back of a whole dirty line from the WF cache
    L1W_FILL = 2'd2    // block fill of a line arriving from L2
  } l1_wop_t;

  // One write-through store travelling to L2.
  typedef struct packed {
    laddr_t laddr;
    woff_t  woff;
    word_t  data;
    be_t    be;
  } wbuf_entry_t;

  // Word 'off' of a line.
  function automatic word_t line_word(line_t line, woff_t off);
    return line[off*WORD_W +: WORD_W];
  endfunction

  // Line with word 'off' replaced byte by byte where 'be' is set.
  function automatic line_t merge_word(line_t line, woff_t off, word_t data, be_t be);
    line_t r = line;
    for (int b = 0; b < BE_W; b++)
      if (be[b]) r[off*WORD_W + b*8 +: 8] = data[b*8 +: 8];
    return r;
  endfunction

endpackage
