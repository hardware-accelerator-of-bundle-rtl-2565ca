// q_add: Q4.16 adder/subtractor, combinational, the carry-chain adder of the
// datapath. sub = 0 gives a + b, sub = 1 gives a - b. Results outside
// [-8, 8) saturate (this design's choice; the original design states that the
// data stay below 3 in magnitude, so saturation is a guard, not a mode).
module q_add
  import ba_pkg::*;
(
  input  logic sub,
  input  q_t   a,
  input  q_t   b,
  output q_t   s
);
  always_comb s = sub ? ba_pkg::q_sub(a, b) : ba_pkg::q_add(a, b);
endmodule
