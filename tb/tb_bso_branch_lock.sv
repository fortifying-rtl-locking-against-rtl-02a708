// tb_bso_branch_lock: exhaustive self-checking testbench for branch
// obfuscation at 8 bits.
//
// For every pair of operands it checks that key bit 1 yields the original
// condition a > b and key bit 0 its inverse a <= b (unsigned).
module tb_bso_branch_lock;
  localparam int unsigned W = 8;

  logic [W-1:0] a, b;
  logic         k_b, cond;
  int checks = 0, failures = 0;

  bso_branch_lock #(.W(W)) dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = W'(i);
        b = W'(j);
        k_b = 1'b1;
        #1;
        checks++;
        if (cond != (i > j)) begin
          failures++;
          $display("FAIL k_b=1 a=%0d b=%0d cond=%b", i, j, cond);
        end
        k_b = 1'b0;
        #1;
        checks++;
        if (cond != (i <= j)) begin
          failures++;
          $display("FAIL k_b=0 a=%0d b=%0d cond=%b", i, j, cond);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
