// scan_decompressor: combinational scan-in decompression network.
//
// N_SCAN_IN tester pins feed N_CHAINS internal scan chains. Chain i receives
// the XOR of the scan-in pins whose index bits are set in the code i + 1, so
// every chain sees a different non-zero combination of the pins. With the
// default two pins and three chains: chain0 = si0, chain1 = si1,
// chain2 = si0 ^ si1. The network has no state; it acts in the same cycle.
// N_CHAINS may be at most 2**N_SCAN_IN - 1.
//
// The published architecture shows a scan decompression stage in front of
// the chains without detailing it; this XOR code, the pin count and the chain
// count (three, as drawn) are this design's own choices.
module scan_decompressor #(
  parameter int unsigned N_SCAN_IN = 2,
  parameter int unsigned N_CHAINS  = 3
) (
  input  logic [N_SCAN_IN-1:0] scan_in,
  output logic [N_CHAINS-1:0]  chain_in
);

  if (N_CHAINS > (1 << N_SCAN_IN) - 1) begin : g_bad_size
    $error("scan_decompressor: N_CHAINS exceeds 2**N_SCAN_IN - 1");
  end

  always_comb begin
    for (int unsigned i = 0; i < N_CHAINS; i++) begin
      chain_in[i] = 1'b0;
      for (int unsigned j = 0; j < N_SCAN_IN; j++) begin
        if ((((i + 1) >> j) & 1) != 0) chain_in[i] = chain_in[i] ^ scan_in[j];
      end
    end
  end

endmodule
