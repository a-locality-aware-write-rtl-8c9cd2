// tb_lru_sets: self-checking test of the LRU age tracker.
//
// Drives random touches on both ports of a 4-set, 4-way tracker and
// compares the victim of every set, each cycle, with a reference kept as a
// recency-ordered list per set (most recent first). Two touches to the same
// set in one cycle must act as A followed by B.
module tb_lru_sets;
  localparam int SETS = 4, WAYS = 4;
  logic clk = 0, rst_n = 0;
  logic a_valid, b_valid;
  logic [1:0] a_set, b_set, a_way, b_way, q_set, q_victim;
  int checks = 0, failures = 0;

  lru_sets #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  int order [SETS][$];   // order[s][0] = most recently used way

  function automatic void ref_touch(int s, int w);
    foreach (order[s][i]) if (order[s][i] == w) begin order[s].delete(i); break; end
    order[s].push_front(w);
  endfunction

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a_valid = 0; b_valid = 0; a_set = 0; b_set = 0; a_way = 0; b_way = 0; q_set = 0;
    // after reset way w has age w: the recency order is 0,1,2,3
    for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) order[s].push_back(w);
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 2000; it++) begin
      // compare every set's victim with the reference
      for (int s = 0; s < SETS; s++) begin
        q_set = 2'(s);
        #1;
        checks++;
        if (int'(q_victim) != order[s][WAYS-1]) begin
          failures++;
          $display("set %0d victim %0d expected %0d", s, q_victim, order[s][WAYS-1]);
        end
      end
      @(negedge clk);
      a_valid = 1'($urandom_range(0, 1));
      b_valid = 1'($urandom_range(0, 3) == 0);
      a_set = 2'($urandom); b_set = ($urandom_range(0, 1) == 0) ? a_set : 2'($urandom);
      a_way = 2'($urandom); b_way = 2'($urandom);
      @(posedge clk);
      if (a_valid) ref_touch(a_set, a_way);
      if (b_valid) ref_touch(b_set, b_way);
      @(negedge clk);
      a_valid = 0; b_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
