// write_buffer: FIFO of write-through stores on their way to L2.
//
// Every store the core completes, whether it hits in the WF cache or in
// the L1, is also pushed here so L2 stays current; the write-filter design
// places such a write buffer between L1 and L2. The depth, the entry format
// (one 64-bit word with byte enables) and the line-address probe are this
// design's own. The probe reports whether any queued store belongs to line
// probe_laddr, so a line is not refetched from L2 before its stores have
// drained. Push and pop are valid/ready handshakes; a pushed entry can be
// popped from the next cycle on. A push into a full buffer is refused.
module write_buffer
  import wf_pkg::*;
#(
  parameter int unsigned DEPTH = 8,
  localparam int unsigned PW   = $clog2(DEPTH)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        push_valid,
  output logic        push_ready,
  input  wbuf_entry_t push_data,
  output logic        pop_valid,
  input  logic        pop_ready,
  output wbuf_entry_t pop_data,
  input  laddr_t      probe_laddr,
  output logic        probe_match,
  output logic        empty
);

  wbuf_entry_t    mem [DEPTH];
  logic [PW-1:0]  rd_ptr, wr_ptr;
  logic [PW:0]    count;

  assign push_ready = count < (PW+1)'(DEPTH);
  assign pop_valid  = count != '0;
  assign empty      = count == '0;
  assign pop_data   = mem[rd_ptr];

  always_comb begin
    probe_match = 1'b0;
    for (int i = 0; i < DEPTH; i++)
      if ((PW+1)'(i) < count && mem[PW'((int'(rd_ptr) + i) % DEPTH)].laddr == probe_laddr)
        probe_match = 1'b1;
  end

  logic do_push, do_pop;
  assign do_push = push_valid && push_ready;
  assign do_pop  = pop_valid && pop_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == PW'(DEPTH - 1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == PW'(DEPTH - 1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW+1)'(do_push) - (PW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk)
    if (do_push) mem[wr_ptr] <= push_data;

  // The occupancy never exceeds the depth, and a pop never meets an empty buffer.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= (PW+1)'(DEPTH));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) do_pop |-> count != '0);

endmodule
