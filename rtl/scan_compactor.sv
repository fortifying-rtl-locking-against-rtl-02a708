// scan_compactor: combinational scan-out compression network.
//
// N_CHAINS scan chain outputs are folded onto N_SCAN_OUT tester pins. Chain i
// is XOR-ed into every pin j whose bit is set in the code i + 1, so each chain
// has its own non-zero signature on the pins and an error on any single chain
// shows up on the outputs. With the default three chains and two pins:
// so0 = chain0 ^ chain2, so1 = chain1 ^ chain2. No state; same-cycle.
// N_CHAINS may be at most 2**N_SCAN_OUT - 1.
//
// The published architecture shows a scan compression stage behind the chains
// without detailing it; this XOR code and the sizes are this design's own.
module scan_compactor #(
  parameter int unsigned N_CHAINS   = 3,
  parameter int unsigned N_SCAN_OUT = 2
) (
  input  logic [N_CHAINS-1:0]   chain_out,
  output logic [N_SCAN_OUT-1:0] scan_out
);

  if (N_CHAINS > (1 << N_SCAN_OUT) - 1) begin : g_bad_size
    $error("scan_compactor: N_CHAINS exceeds 2**N_SCAN_OUT - 1");
  end

  always_comb begin
    for (int unsigned j = 0; j < N_SCAN_OUT; j++) begin
      scan_out[j] = 1'b0;
      for (int unsigned i = 0; i < N_CHAINS; i++) begin
        if ((((i + 1) >> j) & 1) != 0) scan_out[j] = scan_out[j] ^ chain_out[i];
      end
    end
  end

endmodule
