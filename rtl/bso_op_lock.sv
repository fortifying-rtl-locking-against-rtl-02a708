// bso_op_lock: operation obfuscation, one of the behavioural semantics
// obfuscation (BSO) primitives.
//
// A multiplexer driven by one key bit chooses between the real operation and
// a dummy one, so the netlist holds both and does not reveal which is meant:
// out = k_o ? (a - b) : (a + b). Which of the two is the original is known
// only to whoever knows the key. Purely combinational, W-bit modular
// arithmetic.
//
// The operand order of the multiplexer follows the published architecture
// figure; the published text shows the same lock written the other way round
// (k_o ? (a + b) : (a - b)). Either reading gives the same hardware with the
// meaning of k_o inverted; the figure's form is used here.
module bso_op_lock #(
  parameter int unsigned W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         k_o,
  output logic [W-1:0] out_val
);

  logic [W-1:0] sum, diff;

  always_comb begin
    sum     = a + b;
    diff    = a - b;
    out_val = k_o ? diff : sum;
  end

endmodule
