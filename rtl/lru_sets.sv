// lru_sets: true-LRU replacement state for a set-associative or fully
// associative cache.
//
// Each way of each set holds an age from 0 (most recently used) to WAYS-1
// (least recently used); the ages of a set always form a permutation. A
// touch of (set, way) makes that way age 0 and ages by one every way of the
// set that was younger than it. Two touch ports are applied in order in the
// same cycle (port A first, then port B), so two engines can update the
// state together. The victim of a set, the way with age WAYS-1, is a
// combinational output for the set on 'q_set'. After reset way w has age w.
// The LRU policy itself is what the write-filter design specifies for the
// WF cache and the L1; the age-matrix form is this design's own choice.
module lru_sets #(
  parameter int unsigned SETS = 1,
  parameter int unsigned WAYS = 8,
  localparam int unsigned SW  = (SETS > 1) ? $clog2(SETS) : 1,
  localparam int unsigned WW  = (WAYS > 1) ? $clog2(WAYS) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          a_valid,   // touch port A
  input  logic [SW-1:0] a_set,
  input  logic [WW-1:0] a_way,
  input  logic          b_valid,   // touch port B (applied after A)
  input  logic [SW-1:0] b_set,
  input  logic [WW-1:0] b_way,
  input  logic [SW-1:0] q_set,     // set whose victim is asked for
  output logic [WW-1:0] q_victim   // least recently used way of q_set
);

  typedef logic [WAYS-1:0][WW-1:0] ages_t;

  ages_t ages [SETS];

  function automatic ages_t touch(ages_t a, logic [WW-1:0] way);
    ages_t r = a;
    for (int w = 0; w < WAYS; w++)
      if (a[w] < a[way]) r[w] = a[w] + 1'b1;
    r[way] = '0;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++)
        for (int w = 0; w < WAYS; w++)
          ages[s][w] <= WW'(w);
    end else begin
      if (a_valid && b_valid && a_set == b_set)
        ages[a_set] <= touch(touch(ages[a_set], a_way), b_way);
      else begin
        if (a_valid) ages[a_set] <= touch(ages[a_set], a_way);
        if (b_valid) ages[b_set] <= touch(ages[b_set], b_way);
      end
    end
  end

  always_comb begin
    q_victim = '0;
    for (int w = 0; w < WAYS; w++)
      if (ages[q_set][w] == WW'(WAYS - 1)) q_victim = WW'(w);
  end

endmodule
