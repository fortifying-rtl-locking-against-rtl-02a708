// bso_const_lock: constant obfuscation, one of the behavioural semantics
// obfuscation (BSO) primitives.
//
// A confidential constant of the original design is removed from the RTL and
// replaced by key bits: the original out = in + C becomes out = in + k_c, so
// the constant exists only in the locking key. The result is correct only
// when k_c equals the original constant; every other key value gives a
// different sum for every input. Purely combinational, W-bit modular sum.
//
// The transformation follows the published example (an 8-bit constant added
// to an input); the width of 8 bits is that example's, the use of addition as
// the consuming operation is taken from it as well.
module bso_const_lock #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] in_val,
  input  logic [W-1:0] k_c,
  output logic [W-1:0] out_val
);

  always_comb out_val = in_val + k_c;

endmodule
