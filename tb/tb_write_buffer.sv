// tb_write_buffer: self-checking test of the write-through store FIFO.
//
// Random pushes and pops with back-pressure on a 4-deep buffer. Popped
// entries must come out in push order and unchanged, push_ready must fall
// exactly when four entries are held, and the line probe must report
// whether any held entry belongs to the probed line.
module tb_write_buffer;
  import wf_pkg::*;
  localparam int DEPTH = 4;
  logic clk = 0, rst_n = 0;
  logic push_valid, push_ready, pop_valid, pop_ready, probe_match, empty;
  wbuf_entry_t push_data, pop_data;
  laddr_t probe_laddr;
  int checks = 0, failures = 0;
  int full_seen = 0;

  write_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  wbuf_entry_t q [$];

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #400000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push_valid = 0; pop_ready = 0; push_data = '0; probe_laddr = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      push_valid = 1'($urandom_range(0, 2) != 0);
      pop_ready  = 1'($urandom_range(0, 2) == 0);
      push_data.laddr = laddr_t'($urandom_range(0, 7));
      push_data.woff  = woff_t'($urandom);
      push_data.data  = {$urandom, $urandom};
      push_data.be    = be_t'($urandom);
      probe_laddr     = laddr_t'($urandom_range(0, 7));
      #1;
      check(push_ready == (q.size() < DEPTH), "push_ready");
      check(pop_valid == (q.size() != 0), "pop_valid");
      check(empty == (q.size() == 0), "empty");
      if (q.size() == DEPTH) full_seen++;
      begin
        bit m; m = 0;
        foreach (q[i]) if (q[i].laddr == probe_laddr) m = 1;
        check(probe_match == m, "probe_match");
      end
      if (pop_valid) check(pop_data == q[0], "pop_data order");
      @(posedge clk);
      if (pop_valid && pop_ready) void'(q.pop_front());
      if (push_valid && push_ready) q.push_back(push_data);
    end
    check(full_seen > 0, "buffer filled up at least once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
