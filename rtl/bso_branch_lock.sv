// bso_branch_lock: branch obfuscation, one of the behavioural semantics
// obfuscation (BSO) primitives.
//
// A branch condition is XOR-ed with a key bit, and the condition written in
// the RTL is the logical inverse of the original whenever that key bit is 1.
// Here the written condition is (a <= b) ^ k_b: with k_b = 1 it behaves as
// the original a > b, with k_b = 0 as a <= b, and the RTL alone cannot tell
// which was intended. Purely combinational; the comparison is unsigned.
//
// The condition and its locking follow the published example; treating the
// operands as unsigned is this design's own choice.
module bso_branch_lock #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         k_b,
  output logic         cond
);

  always_comb cond = (a <= b) ^ k_b;

endmodule
