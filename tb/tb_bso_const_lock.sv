// tb_bso_const_lock: exhaustive self-checking testbench for constant
// obfuscation at 8 bits.
//
// For every input and every key value it checks out = (in + key) mod 256,
// computed here with integer arithmetic. It then checks the locking property
// for the example constant 8'b11101001: the correct key reproduces
// in + 8'b11101001, and every other key gives a wrong result for every input.
module tb_bso_const_lock;
  localparam int unsigned W = 8;
  localparam logic [W-1:0] SECRET = 8'b11101001;

  logic [W-1:0] in_val, k_c, out_val;
  int checks = 0, failures = 0;
  int wrong_keys_corrupting = 0;

  bso_const_lock #(.W(W)) dut (.*);

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 256; k++) begin
      automatic bit all_wrong = 1'b1;
      for (int i = 0; i < 256; i++) begin
        in_val = W'(i);
        k_c    = W'(k);
        #1;
        checks++;
        if (int'(out_val) != ((i + k) % 256)) begin
          failures++;
          $display("FAIL in=%0d k=%0d out=%0d", i, k, out_val);
        end
        if (int'(out_val) == ((i + int'(SECRET)) % 256)) all_wrong = 1'b0;
      end
      if (W'(k) != SECRET && all_wrong) wrong_keys_corrupting++;
    end
    // 255 wrong keys, each corrupting every output.
    checks++;
    if (wrong_keys_corrupting != 255) begin
      failures++;
      $display("FAIL only %0d wrong keys corrupt every output", wrong_keys_corrupting);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
