// tb_fmi_controller: self-checking testbench for the FMI state machine.
//
// Directed part: walks every row of the FMI operation table (chip reset held;
// reset released with SE low and with SE high; SE rising in functional mode)
// and checks the state and the three key-register commands at each step,
// including that a clear is commanded in the very cycle SE is first seen and
// that only a chip reset brings functional mode back. Random part: random SE
// and occasional chip resets, compared cycle by cycle with a reference model
// of the state diagram kept in this file.
module tb_fmi_controller;
  import fmi_pkg::*;

  logic clk = 1'b0;
  logic chip_rst, se;
  logic key_clear, key_load, key_scan_en;
  fmi_state_t state;
  int checks = 0, failures = 0;

  fmi_controller dut (.*);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s (state=%s clr=%b ld=%b scan_en=%b)", $time, what,
               state.name(), key_clear, key_load, key_scan_en);
    end
  endtask

  // Expected commands for a given state and SE value, from the operation table.
  task automatic chk_cmds(input fmi_state_t s, input bit sev, input string what);
    bit e_clr, e_ld, e_sh;
    case (s)
      FMI_RESET: begin e_clr = 0; e_ld = !sev; e_sh = 1; end
      FMI_FUNC:  begin e_clr = sev; e_ld = 0; e_sh = 0; end
      FMI_CLEAR: begin e_clr = 1; e_ld = 0; e_sh = 0; end
      default:   begin e_clr = 0; e_ld = 0; e_sh = 1; end
    endcase
    chk(state == s, {what, ": state"});
    chk(key_clear == e_clr && key_load == e_ld && key_scan_en == e_sh, {what, ": commands"});
  endtask

  // Apply inputs just after a falling edge, let them settle.
  task automatic drive(input bit r, input bit s);
    @(negedge clk);
    chip_rst = r;
    se = s;
    #1;
  endtask

  fmi_state_t model;

  initial begin
    chip_rst = 1'b1;
    se = 1'b0;
    // Row 1: reset held, SE don't care.
    drive(1, 0); chk_cmds(FMI_RESET, 0, "reset held se=0");
    drive(1, 1); chk_cmds(FMI_RESET, 1, "reset held se=1");
    // Row 3: reset released with SE low -> functional, key from TPM.
    drive(0, 0); chk_cmds(FMI_RESET, 0, "release se=0");
    drive(0, 0); chk_cmds(FMI_FUNC, 0, "functional");
    repeat (5) begin drive(0, 0); chk_cmds(FMI_FUNC, 0, "functional stays"); end
    // Row 4: SE rises in functional mode -> clear at once, then scan-in.
    drive(0, 1); chk_cmds(FMI_FUNC, 1, "se rises in functional: clear now");
    drive(0, 1); chk_cmds(FMI_CLEAR, 1, "clear state");
    drive(0, 1); chk_cmds(FMI_TEST, 1, "test mode shifting");
    drive(0, 0); chk_cmds(FMI_TEST, 0, "test mode capture");
    repeat (5) begin drive(0, 0); chk_cmds(FMI_TEST, 0, "test mode sticks with se low"); end
    // Only a chip reset returns to functional mode.
    drive(1, 0); chk_cmds(FMI_RESET, 0, "reset from test");
    drive(0, 0); drive(0, 0); chk_cmds(FMI_FUNC, 0, "functional after reset");
    // One-cycle SE glitch: key cleared, clear state holds while SE low.
    drive(0, 1); chk_cmds(FMI_FUNC, 1, "glitch");
    drive(0, 0); chk_cmds(FMI_CLEAR, 0, "clear holds");
    drive(0, 0); chk_cmds(FMI_CLEAR, 0, "clear holds 2");
    drive(0, 1); drive(0, 0); chk_cmds(FMI_TEST, 0, "test after clear");
    // Row 2: reset released with SE high -> test mode, key from scan-in.
    drive(1, 1); drive(0, 1); chk_cmds(FMI_RESET, 1, "release se=1");
    drive(0, 1); chk_cmds(FMI_TEST, 1, "test from reset");
    drive(0, 0); chk_cmds(FMI_TEST, 0, "test from reset, se low");

    // Random part against a reference model.
    drive(1, 0);
    model = FMI_RESET;
    for (int n = 0; n < 5000; n++) begin
      bit r, s;
      r = ($urandom_range(0, 99) < 3);
      s = ($urandom_range(0, 99) < 15);
      @(negedge clk);
      chip_rst = r;
      se = s;
      if (r) model = FMI_RESET;
      #1;
      chk_cmds(model, s, "random");
      @(posedge clk);
      if (!r) begin
        case (model)
          FMI_RESET: model = s ? FMI_TEST : FMI_FUNC;
          FMI_FUNC:  if (s) model = FMI_CLEAR;
          FMI_CLEAR: if (s) model = FMI_TEST;
          default:   model = FMI_TEST;
        endcase
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
