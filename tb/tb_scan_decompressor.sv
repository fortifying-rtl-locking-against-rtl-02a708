// tb_scan_decompressor: exhaustive self-checking testbench for the scan-in
// decompression network, at the default size (2 pins, 3 chains) and at
// 3 pins / 7 chains. Expected chain values are written out by hand from the
// XOR code (chain i = XOR of the pins whose bits are set in i + 1).
module tb_scan_decompressor;
  logic [1:0] si2;
  logic [2:0] ch3;
  logic [2:0] si3;
  logic [6:0] ch7;
  int checks = 0, failures = 0;

  scan_decompressor                                   dut_a (.scan_in(si2), .chain_in(ch3));
  scan_decompressor #(.N_SCAN_IN(3), .N_CHAINS(7))   dut_b (.scan_in(si3), .chain_in(ch7));

  initial begin : watchdog
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      logic [2:0] exp3;
      si2 = 2'(v);
      #1;
      exp3 = {si2[0] ^ si2[1], si2[1], si2[0]};
      checks++;
      if (ch3 !== exp3) begin failures++; $display("FAIL si=%b ch=%b exp=%b", si2, ch3, exp3); end
    end
    for (int v = 0; v < 8; v++) begin
      logic [6:0] exp7;
      si3 = 3'(v);
      #1;
      exp7 = {si3[0] ^ si3[1] ^ si3[2], si3[1] ^ si3[2], si3[0] ^ si3[2], si3[2],
              si3[0] ^ si3[1], si3[1], si3[0]};
      checks++;
      if (ch7 !== exp7) begin failures++; $display("FAIL si=%b ch=%b exp=%b", si3, ch7, exp7); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
