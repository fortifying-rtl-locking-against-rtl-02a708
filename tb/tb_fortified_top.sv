// tb_fortified_top: end-to-end self-checking testbench of the fortified
// design at its default parameters (8-bit data, 10-bit key, 2 scan-in pins,
// 3 chains, 2 scan-out pins).
//
// A cycle-accurate reference model of the whole design (FMI state, key cells,
// design cells, chain stitching, XOR decompression and compaction) runs next
// to the design and every cycle the primary outputs, the scan-out pins and
// functional_mode are compared with it. On top of that, each mechanism of the
// scheme is checked directly and counted:
//   func_ops     functional mode after reset with SE low: outputs equal the
//                original, unlocked function (a + 8'hE9, a + b, a > b)
//   fmi_clears   SE raised in functional mode: the full scan unload that
//                follows is identical for two secret keys that differ in a
//                key bit the design cells do not reflect, so that key bit
//                does not leak; the model checks that every key cell reads 0
//   sticky       test mode survives SE going low; functional mode is not
//                restored without a chip reset
//   test_resets  chip reset released with SE high enters test mode directly
//   debug_ops    a trusted user shifts the correct key in through the scan
//                pins in test mode and gets correct outputs
//   wrong_ops    a wrong user key shifted in corrupts the outputs
//   shifts       scan shift cycles
// A mechanism that never happened counts as a failure.
module tb_fortified_top;
  import fmi_pkg::*;

  localparam int unsigned DATA_W  = 8;
  localparam int unsigned KEY_W   = DATA_W + 2;
  localparam int unsigned N_DSN   = 4 * DATA_W + 1;
  localparam int unsigned N_CELLS = N_DSN + KEY_W;
  localparam int unsigned N_CH    = 3;
  localparam int unsigned LEN0    = (N_CELLS + N_CH - 1) / N_CH;   // longest chain
  localparam logic [KEY_W-1:0] GOOD_KEY = {1'b1, 1'b0, 8'b11101001};
  // Key slots for the default sizes: rows 5..9 of chains 0 and 1.
  localparam int KEY_SLOT[KEY_W] = '{15, 16, 18, 19, 21, 22, 24, 25, 27, 28};

  logic clk = 1'b0;
  logic chip_rst, se;
  logic [KEY_W-1:0] tpm_key;
  logic [DATA_W-1:0] a, b, c1, c2;
  logic c3, functional_mode;
  logic [1:0] scan_in, scan_out;

  fortified_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int func_ops = 0, fmi_clears = 0, sticky = 0, test_resets = 0;
  int debug_ops = 0, wrong_ops = 0, shifts = 0;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %0t: %s", $time, what);
    end
  endtask

  // ---------------- reference model ----------------
  int slot_key[N_CELLS];   // key bit in slot, or -1
  int slot_dsn[N_CELLS];   // design cell in slot, or -1
  logic [N_CELLS-1:0] m_slots;
  fmi_state_t m_st;

  function automatic logic [N_DSN-1:0] m_dsn();
    logic [N_DSN-1:0] v;
    for (int j = 0; j < N_CELLS; j++) if (slot_dsn[j] >= 0) v[slot_dsn[j]] = m_slots[j];
    return v;
  endfunction

  function automatic logic [KEY_W-1:0] m_key();
    logic [KEY_W-1:0] v;
    for (int j = 0; j < N_CELLS; j++) if (slot_key[j] >= 0) v[slot_key[j]] = m_slots[j];
    return v;
  endfunction

  // What the chains see of slot j: key cells read 0 outside reset/test state.
  function automatic logic m_vis(int j);
    if (slot_key[j] >= 0 && !(m_st == FMI_RESET || m_st == FMI_TEST)) return 1'b0;
    return m_slots[j];
  endfunction

  function automatic logic [1:0] m_scan_out();
    logic [2:0] tail;
    for (int c = 0; c < N_CH; c++) begin
      int last = c;
      while (last + N_CH < N_CELLS) last += N_CH;
      tail[c] = m_vis(last);
    end
    return {tail[1] ^ tail[2], tail[0] ^ tail[2]};
  endfunction

  // One rising edge of the model with the current inputs.
  function automatic void m_step();
    logic [N_DSN-1:0] d, dn;
    logic [KEY_W-1:0] k, kn;
    logic [N_CELLS-1:0] si, nxt;
    logic [2:0] chin;
    logic [DATA_W-1:0] ma, mb;
    chin = {scan_in[0] ^ scan_in[1], scan_in[1], scan_in[0]};
    for (int j = 0; j < N_CELLS; j++) si[j] = (j < N_CH) ? chin[j] : m_vis(j - N_CH);
    d = m_dsn();
    k = m_key();
    ma = d[DATA_W-1:0];
    mb = d[2*DATA_W-1:DATA_W];
    // design cells {c3, c2, c1, b, a}
    dn = {(ma <= mb) ^ k[DATA_W+1],
          k[DATA_W] ? DATA_W'(ma - mb) : DATA_W'(ma + mb),
          DATA_W'(ma + k[DATA_W-1:0]), b, a};
    // key cells, per the FMI operation table
    kn = k;
    case (m_st)
      FMI_RESET: kn = se ? k : tpm_key;
      FMI_FUNC:  if (se) kn = '0;
      FMI_CLEAR: kn = '0;
      default:   ;
    endcase
    for (int j = 0; j < N_CELLS; j++) begin
      if (slot_key[j] >= 0) begin
        bit shifting = se && (m_st == FMI_RESET || m_st == FMI_TEST);
        nxt[j] = shifting ? si[j] : kn[slot_key[j]];
      end else begin
        nxt[j] = se ? si[j] : dn[slot_dsn[j]];
      end
    end
    m_slots = nxt;
    case (m_st)
      FMI_RESET: m_st = se ? FMI_TEST : FMI_FUNC;
      FMI_FUNC:  if (se) m_st = FMI_CLEAR;
      FMI_CLEAR: if (se) m_st = FMI_TEST;
      default:   m_st = FMI_TEST;
    endcase
  endfunction

  function automatic void m_reset();
    m_slots = '0;
    m_st = FMI_RESET;
  endfunction

  // Compare the design with the model (outputs settle after the edge).
  task automatic compare(input string what);
    logic [N_DSN-1:0] d;
    d = m_dsn();
    chk(c1 === d[3*DATA_W-1:2*DATA_W] && c2 === d[4*DATA_W-1:3*DATA_W] && c3 === d[4*DATA_W],
        {what, ": primary outputs vs model"});
    chk(scan_out === m_scan_out(), {what, ": scan_out vs model"});
    chk(functional_mode === (m_st == FMI_FUNC), {what, ": functional_mode vs model"});
  endtask

  // One clock cycle: drive at the falling edge, step the model at the rising.
  task automatic cycle(input bit r, input bit s, input logic [1:0] pins,
                       input logic [DATA_W-1:0] va, input logic [DATA_W-1:0] vb,
                       input string what);
    @(negedge clk);
    chip_rst = r; se = s; scan_in = pins; a = va; b = vb;
    if (r) m_reset();
    @(posedge clk);
    if (!r) m_step();
    if (s) shifts++;
    #1;
    compare(what);
  endtask

  // Scan-in streams that leave the given design cells and key in the chains.
  // Chain 2 receives pin0 ^ pin1, so its (design) cells end up holding the
  // XOR of the two neighbouring slots; dsn_eff returns what was really loaded.
  task automatic scan_load(input logic [N_DSN-1:0] dsn, input logic [KEY_W-1:0] k,
                           input string what, output logic [N_DSN-1:0] dsn_eff);
    logic [N_CELLS-1:0] want, got;
    for (int j = 0; j < N_CELLS; j++)
      want[j] = (slot_key[j] >= 0) ? k[slot_key[j]] : dsn[slot_dsn[j]];
    for (int t = 0; t < LEN0; t++) begin
      int p = LEN0 - 1 - t;
      logic [1:0] pins;
      pins[0] = (N_CH * p     < N_CELLS) ? want[N_CH * p]     : 1'b0;
      pins[1] = (N_CH * p + 1 < N_CELLS) ? want[N_CH * p + 1] : 1'b0;
      cycle(0, 1, pins, DATA_W'($urandom), DATA_W'($urandom), what);
    end
    for (int j = 0; j < N_CELLS; j++)
      got[j] = (j % N_CH == 2) ? (want[j-2] ^ want[j-1]) : want[j];
    for (int j = 0; j < N_CELLS; j++)
      if (slot_dsn[j] >= 0) dsn_eff[slot_dsn[j]] = got[j];
  endtask

  // Reset, release with SE low, run functional operations with the original-function check.
  task automatic functional_run(input int n);
    logic [DATA_W-1:0] ha[$], hb[$];
    cycle(1, 0, 2'b00, '0, '0, "reset");
    for (int i = 0; i < n + 1; i++) begin
      logic [DATA_W-1:0] va, vb;
      va = DATA_W'($urandom);
      vb = DATA_W'($urandom);
      cycle(0, 0, 2'b00, va, vb, "functional");
      chk(functional_mode === 1'b1, "functional_mode after reset with SE low");
      // a and b sampled at the previous edge show on c1..c3 after this one.
      if (ha.size() == 1 && tpm_key == GOOD_KEY) begin
        logic [DATA_W-1:0] pa, pb;
        pa = ha.pop_front();
        pb = hb.pop_front();
        chk(c1 === DATA_W'(pa + 8'hE9) && c2 === DATA_W'(pa + pb) && c3 === (pa > pb),
            "functional mode computes the original function");
        func_ops++;
      end
      if (ha.size() == 1) begin
        void'(ha.pop_front());
        void'(hb.pop_front());
      end
      ha.push_back(va);
      hb.push_back(vb);
    end
    // Zero inputs so that the design cells no longer depend on k_o.
    repeat (3) cycle(0, 0, 2'b00, '0, '0, "functional, zero inputs");
  endtask

  // Attack: raise SE in functional mode and unload the chains; return the stream.
  task automatic attack_unload(output logic [2*LEN0-1:0] stream);
    for (int t = 0; t < LEN0; t++) begin
      cycle(0, 1, 2'b00, '0, '0, "attack unload");
      stream[2*t +: 2] = scan_out;
    end
    fmi_clears++;
  endtask

  initial begin
    logic [2*LEN0-1:0] stream_a, stream_b;
    logic [KEY_W-1:0] other_key;
    chip_rst = 1'b1; se = 1'b0; scan_in = '0; a = '0; b = '0;
    tpm_key = GOOD_KEY;

    // Slot map of the defaults.
    for (int j = 0; j < N_CELLS; j++) slot_key[j] = -1;
    for (int i = 0; i < KEY_W; i++) slot_key[KEY_SLOT[i]] = i;
    begin
      automatic int n = 0;
      for (int j = 0; j < N_CELLS; j++) begin
        slot_dsn[j] = (slot_key[j] >= 0) ? -1 : n;
        if (slot_key[j] < 0) n++;
      end
    end
    m_reset();

    // 1. Functional mode, then an oracle attack through scan, secret key A.
    functional_run(200);
    attack_unload(stream_a);

    // 2. Same sequence with another secret key: the unload must be identical.
    // The second key differs in k_o only; with zero inputs before the attack
    // the design cells are then the same in both runs, and any difference in
    // the unload could only come from a key cell.
    other_key = GOOD_KEY ^ (KEY_W'(1) << DATA_W);
    tpm_key = other_key;
    functional_run(20);
    attack_unload(stream_b);
    chk(stream_a === stream_b, "scan unload after SE activity does not depend on the secret key");
    if (stream_a !== stream_b) $display("streams %b\n        %b", stream_a, stream_b);
    tpm_key = GOOD_KEY;

    // 3. Test mode sticks with SE low; captures run with the cleared key.
    for (int i = 0; i < 50; i++) begin
      cycle(0, 0, 2'b00, DATA_W'($urandom), DATA_W'($urandom), "test mode, SE low");
      chk(functional_mode === 1'b0, "no return to functional mode without chip reset");
      sticky++;
    end
    chk(m_key() == '0, "key register cleared after scan activity");

    // 4. Reset released with SE high: test mode, key from scan-in.
    cycle(1, 1, 2'b00, '0, '0, "reset, SE high");
    cycle(0, 1, 2'b00, '0, '0, "release, SE high");
    chk(functional_mode === 1'b0, "reset with SE high enters test mode");
    test_resets++;

    // 5. Debug: shift in the correct key and chosen a/b, capture, check outputs.
    for (int r = 0; r < 20; r++) begin
      logic [DATA_W-1:0] va, vb;
      logic [N_DSN-1:0] dsn, eff;
      dsn = {1'b0, DATA_W'(0), DATA_W'(0), DATA_W'($urandom), DATA_W'($urandom)};
      scan_load(dsn, GOOD_KEY, "debug load", eff);
      va = eff[DATA_W-1:0];
      vb = eff[2*DATA_W-1:DATA_W];
      chk(m_key() == GOOD_KEY, "model holds the correct key after the load");
      cycle(0, 0, 2'b00, '0, '0, "debug capture");
      chk(c1 === DATA_W'(va + 8'hE9) && c2 === DATA_W'(va + vb) && c3 === (va > vb),
          "correct key through scan gives correct outputs in test mode");
      chk(functional_mode === 1'b0, "debug stays in test mode");
      debug_ops++;
    end

    // 6. Wrong user keys through scan corrupt the outputs.
    for (int r = 0; r < 40; r++) begin
      logic [DATA_W-1:0] va, vb;
      logic [KEY_W-1:0] uk;
      logic [N_DSN-1:0] eff;
      do uk = KEY_W'($urandom); while (uk == GOOD_KEY);
      scan_load({1'b0, DATA_W'(0), DATA_W'(0), DATA_W'($urandom), DATA_W'($urandom)}, uk,
                "user key load", eff);
      va = eff[DATA_W-1:0];
      vb = eff[2*DATA_W-1:DATA_W];
      cycle(0, 0, 2'b00, '0, '0, "user key capture");
      if (c1 !== DATA_W'(va + 8'hE9) || c2 !== DATA_W'(va + vb) || c3 !== (va > vb)) wrong_ops++;
    end
    chk(wrong_ops > 20, "wrong user keys corrupt the outputs");

    // 7. Only a chip reset restores functional mode.
    functional_run(50);

    chk(func_ops > 0,    "mechanism: functional operation");
    chk(fmi_clears > 0,  "mechanism: key clear on scan activity");
    chk(sticky > 0,      "mechanism: test mode sticks");
    chk(test_resets > 0, "mechanism: reset into test mode");
    chk(debug_ops > 0,   "mechanism: correct key through scan");
    chk(wrong_ops > 0,   "mechanism: wrong user key");
    chk(shifts > 0,      "mechanism: scan shift");
    $display("mechanisms: func_ops=%0d fmi_clears=%0d sticky=%0d test_resets=%0d debug_ops=%0d wrong_ops=%0d shifts=%0d",
             func_ops, fmi_clears, sticky, test_resets, debug_ops, wrong_ops, shifts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
