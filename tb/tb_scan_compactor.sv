// tb_scan_compactor: exhaustive self-checking testbench for the scan-out
// compression network, at the default size (3 chains, 2 pins) and at
// 7 chains / 3 pins. Expected pin values are written out by hand from the
// XOR code. It also checks that a single flipped chain bit always changes
// the pins (each chain has a non-zero signature).
module tb_scan_compactor;
  logic [2:0] ch3;
  logic [1:0] so2;
  logic [6:0] ch7;
  logic [2:0] so3;
  int checks = 0, failures = 0;

  scan_compactor                                    dut_a (.chain_out(ch3), .scan_out(so2));
  scan_compactor #(.N_CHAINS(7), .N_SCAN_OUT(3))   dut_b (.chain_out(ch7), .scan_out(so3));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp2, base;
      ch3 = 3'(v);
      #1;
      exp2 = {ch3[1] ^ ch3[2], ch3[0] ^ ch3[2]};
      checks++;
      if (so2 !== exp2) begin failures++; $display("FAIL ch=%b so=%b exp=%b", ch3, so2, exp2); end
      base = so2;
      for (int i = 0; i < 3; i++) begin
        ch3 = 3'(v) ^ (3'b1 << i);
        #1;
        checks++;
        if (so2 === base) begin failures++; $display("FAIL flip of chain %0d not seen", i); end
      end
    end
    for (int v = 0; v < 128; v++) begin
      logic [2:0] exp3;
      ch7 = 7'(v);
      #1;
      exp3 = {ch7[3] ^ ch7[4] ^ ch7[5] ^ ch7[6],
              ch7[1] ^ ch7[2] ^ ch7[5] ^ ch7[6],
              ch7[0] ^ ch7[2] ^ ch7[4] ^ ch7[6]};
      checks++;
      if (so3 !== exp3) begin failures++; $display("FAIL ch=%b so=%b exp=%b", ch7, so3, exp3); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
