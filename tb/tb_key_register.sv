// tb_key_register: self-checking testbench for the key register.
//
// Drives random command mixes (clear, load from the tamper-proof memory,
// scan shift with and without scan enable, hold) and chip resets, and checks
// the register after every edge against a model that applies the command
// priority chip reset > clear > load > shift, and that the scan outputs read
// 0 whenever scan_en is low. Uses the default 128-bit width.
module tb_key_register;
  localparam int unsigned KEY_W = 128;

  logic clk = 1'b0;
  logic chip_rst, se, clear, load, scan_en;
  logic [KEY_W-1:0] tpm_key, scan_si, key, scan_so, model;
  int checks = 0, failures = 0;
  int n_clear = 0, n_load = 0, n_shift = 0;

  key_register dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [KEY_W-1:0] rnd();
    logic [KEY_W-1:0] v;
    for (int i = 0; i < KEY_W; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    chip_rst = 1'b1; se = 0; clear = 0; load = 0; scan_en = 0;
    tpm_key = rnd(); scan_si = rnd();
    #1;
    checks++;
    if (key !== '0) begin failures++; $display("FAIL reset value"); end
    model = '0;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      chip_rst = ($urandom_range(0, 99) < 2);
      clear    = ($urandom_range(0, 99) < 20);
      load     = ($urandom_range(0, 99) < 30);
      scan_en  = ($urandom_range(0, 99) < 50);
      se       = ($urandom_range(0, 99) < 60);
      tpm_key  = rnd();
      scan_si  = rnd();
      if (chip_rst) model = '0;
      @(posedge clk);
      if (!chip_rst) begin
        if (clear) begin model = '0; n_clear++; end
        else if (load) begin model = tpm_key; n_load++; end
        else if (scan_en && se) begin model = scan_si; n_shift++; end
      end
      #1;
      checks++;
      if (key !== model) begin
        failures++;
        $display("FAIL %0t: key=%h expected %h", $time, key, model);
      end
      // Scan outputs are masked unless the key cells are in the chains.
      checks++;
      if (scan_so !== (scan_en ? model : '0)) begin
        failures++;
        $display("FAIL %0t: scan_so=%h scan_en=%b", $time, scan_so, scan_en);
      end
    end
    checks++;
    if (n_clear == 0 || n_load == 0 || n_shift == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
