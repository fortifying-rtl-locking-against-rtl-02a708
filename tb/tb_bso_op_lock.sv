// tb_bso_op_lock: exhaustive self-checking testbench for operation
// obfuscation at 8 bits.
//
// For every pair of operands it checks that key bit 0 gives (a + b) mod 256
// and key bit 1 gives (a - b) mod 256, computed here with integer arithmetic.
module tb_bso_op_lock;
  localparam int unsigned W = 8;

  logic [W-1:0] a, b, out_val;
  logic         k_o;
  int checks = 0, failures = 0;

  bso_op_lock #(.W(W)) dut (.*);

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
        k_o = 1'b0;
        #1;
        checks++;
        if (int'(out_val) != ((i + j) % 256)) begin
          failures++;
          $display("FAIL k_o=0 a=%0d b=%0d out=%0d", i, j, out_val);
        end
        k_o = 1'b1;
        #1;
        checks++;
        if (int'(out_val) != ((i - j + 256) % 256)) begin
          failures++;
          $display("FAIL k_o=1 a=%0d b=%0d out=%0d", i, j, out_val);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
