// tb_fortified_top_wide: end-to-end testbench of the fortified design at a
// non-default size: 30-bit datapath (so a 32-bit key register), three scan-in
// pins, seven chains and three scan-out pins, 153 scan cells in all. It
// exercises the size-generic parts of the top (slot map, XOR codes with
// single-pin chains 0, 1 and 3) that the default configuration leaves fixed.
// The testbench is size-generic; a 128-bit key (DATA_W = 126) also passes,
// but takes minutes to build.
//
// A size-generic reference model (slot map, XOR decompression and
// compaction, FMI states, key and design cells) is compared with the outputs
// and scan pins every cycle. Mechanisms checked and counted, as in the
// default-size testbench: functional operation with the key from the
// tamper-proof memory; a scan attack in functional mode whose unload does not
// depend on a key bit that no design cell reflects; test mode sticking
// without a chip reset; reset into test mode; debug with the full key
// shifted in through the scan pins; wrong keys corrupting the outputs.
module tb_fortified_top_wide;
  import fmi_pkg::*;

  localparam int unsigned DATA_W  = 30;
  localparam int unsigned N_IN    = 3;
  localparam int unsigned N_CH    = 7;
  localparam int unsigned N_OUT   = 3;
  localparam int unsigned KEY_W   = DATA_W + 2;
  localparam int unsigned N_DSN   = 4 * DATA_W + 1;
  localparam int unsigned N_CELLS = N_DSN + KEY_W;
  localparam int unsigned ROWS    = (N_CELLS + N_CH - 1) / N_CH;

  typedef logic [DATA_W-1:0] word_t;
  typedef logic [KEY_W-1:0]  key_t;

  logic clk = 1'b0;
  logic chip_rst, se;
  key_t tpm_key;
  word_t a, b, c1, c2;
  logic c3, functional_mode;
  logic [N_IN-1:0] scan_in;
  logic [N_OUT-1:0] scan_out;

  fortified_top #(.DATA_W(DATA_W), .N_SCAN_IN(N_IN), .N_CHAINS(N_CH), .N_SCAN_OUT(N_OUT)) dut (.*);

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
      if (failures < 20) $display("FAIL %0t: %s", $time, what);
    end
  endtask

  function automatic word_t rnd_word();
    logic [127:0] v = {$urandom, $urandom, $urandom, $urandom};
    return v[DATA_W-1:0];
  endfunction

  function automatic key_t rnd_key();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  // Expected outputs of the locked logic for a key.
  function automatic logic [2*DATA_W:0] locked_f(word_t va, word_t vb, key_t k);
    word_t r1, r2;
    logic r3;
    r1 = va + k[DATA_W-1:0];
    r2 = k[DATA_W] ? word_t'(va - vb) : word_t'(va + vb);
    r3 = (va <= vb) ^ k[DATA_W+1];
    return {r3, r2, r1};
  endfunction

  // ---------------- slot map ----------------
  // Chains fed by a single pin: code i + 1 has one bit set.
  function automatic bit one_pin(int c);
    return $countones(c + 1) == 1;
  endfunction

  int slot_key[N_CELLS];
  int slot_dsn[N_CELLS];

  function automatic void build_map();
    int per_row = 0, key_rows, first, n;
    for (int c = 0; c < N_CH; c++) if (one_pin(c)) per_row++;
    key_rows = (KEY_W + per_row - 1) / per_row;
    first = N_CH * ((ROWS - key_rows) / 2);
    n = 0;
    for (int j = 0; j < N_CELLS; j++) begin
      slot_key[j] = -1;
      if (j >= first && one_pin(j % N_CH) && n < KEY_W) begin
        slot_key[j] = n;
        n++;
      end
    end
    n = 0;
    for (int j = 0; j < N_CELLS; j++) begin
      slot_dsn[j] = (slot_key[j] >= 0) ? -1 : n;
      if (slot_key[j] < 0) n++;
    end
  endfunction

  // ---------------- model ----------------
  logic [N_CELLS-1:0] m_slots;
  fmi_state_t m_st;

  function automatic logic [N_DSN-1:0] m_dsn();
    logic [N_DSN-1:0] v;
    for (int j = 0; j < N_CELLS; j++) if (slot_dsn[j] >= 0) v[slot_dsn[j]] = m_slots[j];
    return v;
  endfunction

  function automatic key_t m_key();
    key_t v;
    for (int j = 0; j < N_CELLS; j++) if (slot_key[j] >= 0) v[slot_key[j]] = m_slots[j];
    return v;
  endfunction

  function automatic logic m_vis(int j);
    if (slot_key[j] >= 0 && !(m_st == FMI_RESET || m_st == FMI_TEST)) return 1'b0;
    return m_slots[j];
  endfunction

  function automatic logic [N_CH-1:0] chain_code_in(logic [N_IN-1:0] pins);
    logic [N_CH-1:0] v;
    for (int c = 0; c < N_CH; c++) v[c] = ^(pins & N_IN'(c + 1));
    return v;
  endfunction

  function automatic logic [N_OUT-1:0] m_scan_out();
    logic [N_OUT-1:0] v = '0;
    for (int c = 0; c < N_CH; c++) begin
      int last = c;
      while (last + N_CH < N_CELLS) last += N_CH;
      if (m_vis(last)) v ^= N_OUT'(c + 1);
    end
    return v;
  endfunction

  function automatic void m_step();
    logic [N_DSN-1:0] d, dn;
    key_t k, kn;
    logic [N_CELLS-1:0] si, nxt;
    logic [N_CH-1:0] chin;
    word_t ma, mb;
    chin = chain_code_in(scan_in);
    for (int j = 0; j < N_CELLS; j++) si[j] = (j < N_CH) ? chin[j] : m_vis(j - N_CH);
    d = m_dsn();
    k = m_key();
    ma = d[DATA_W-1:0];
    mb = d[2*DATA_W-1:DATA_W];
    dn = {locked_f(ma, mb, k), b, a};
    kn = k;
    case (m_st)
      FMI_RESET: kn = se ? k : tpm_key;
      FMI_FUNC:  if (se) kn = '0;
      FMI_CLEAR: kn = '0;
      default:   ;
    endcase
    for (int j = 0; j < N_CELLS; j++) begin
      if (slot_key[j] >= 0)
        nxt[j] = (se && (m_st == FMI_RESET || m_st == FMI_TEST)) ? si[j] : kn[slot_key[j]];
      else
        nxt[j] = se ? si[j] : dn[slot_dsn[j]];
    end
    m_slots = nxt;
    case (m_st)
      FMI_RESET: m_st = se ? FMI_TEST : FMI_FUNC;
      FMI_FUNC:  if (se) m_st = FMI_CLEAR;
      FMI_CLEAR: if (se) m_st = FMI_TEST;
      default:   m_st = FMI_TEST;
    endcase
  endfunction

  task automatic compare(input string what);
    logic [N_DSN-1:0] d;
    d = m_dsn();
    chk({c3, c2, c1} === d[N_DSN-1:2*DATA_W], {what, ": primary outputs vs model"});
    chk(scan_out === m_scan_out(), {what, ": scan_out vs model"});
    chk(functional_mode === (m_st == FMI_FUNC), {what, ": functional_mode vs model"});
  endtask

  task automatic cycle(input bit r, input bit s, input logic [N_IN-1:0] pins,
                       input word_t va, input word_t vb, input string what);
    @(negedge clk);
    chip_rst = r; se = s; scan_in = pins; a = va; b = vb;
    if (r) begin m_slots = '0; m_st = FMI_RESET; end
    @(posedge clk);
    if (!r) m_step();
    if (s) shifts++;
    #1;
    compare(what);
  endtask

  // Shift so that the single-pin chains hold the wanted values; returns the
  // design-cell content actually loaded (other chains get XORs of the pins).
  task automatic scan_load(input logic [N_DSN-1:0] dsn, input key_t k, input string what,
                           output logic [N_DSN-1:0] dsn_eff);
    logic [N_CELLS-1:0] want, got;
    logic [N_IN-1:0] pins_at[ROWS];
    for (int j = 0; j < N_CELLS; j++)
      want[j] = (slot_key[j] >= 0) ? k[slot_key[j]] : dsn[slot_dsn[j]];
    for (int p = 0; p < ROWS; p++)
      for (int q = 0; q < N_IN; q++) begin
        int j = N_CH * p + (1 << q) - 1;
        pins_at[p][q] = (j < N_CELLS) ? want[j] : 1'b0;
      end
    for (int t = 0; t < ROWS; t++)
      cycle(0, 1, pins_at[ROWS - 1 - t], rnd_word(), rnd_word(), what);
    for (int j = 0; j < N_CELLS; j++)
      got[j] = ^(pins_at[j / N_CH] & N_IN'((j % N_CH) + 1));
    for (int j = 0; j < N_CELLS; j++)
      if (slot_dsn[j] >= 0) dsn_eff[slot_dsn[j]] = got[j];
  endtask

  task automatic functional_run(input int n);
    word_t pa = '0, pb = '0;
    cycle(1, 0, '0, '0, '0, "reset");
    for (int i = 0; i < n + 1; i++) begin
      word_t va, vb;
      va = rnd_word();
      vb = rnd_word();
      cycle(0, 0, '0, va, vb, "functional");
      chk(functional_mode === 1'b1, "functional mode after reset with SE low");
      if (i > 0) begin
        chk({c3, c2, c1} === locked_f(pa, pb, tpm_key), "functional result with the TPM key");
        func_ops++;
      end
      pa = va;
      pb = vb;
    end
    repeat (3) cycle(0, 0, '0, '0, '0, "functional, zero inputs");
  endtask

  task automatic attack_unload(output logic [N_OUT*ROWS-1:0] stream);
    for (int t = 0; t < ROWS; t++) begin
      cycle(0, 1, '0, '0, '0, "attack unload");
      stream[N_OUT*t +: N_OUT] = scan_out;
    end
    fmi_clears++;
  endtask

  initial begin
    logic [N_OUT*ROWS-1:0] stream_a, stream_b;
    key_t good;
    chip_rst = 1'b1; se = 1'b0; scan_in = '0; a = '0; b = '0;
    build_map();
    m_slots = '0;
    m_st = FMI_RESET;
    good = rnd_key();
    tpm_key = good;

    functional_run(100);
    attack_unload(stream_a);
    tpm_key = good ^ (key_t'(1) << DATA_W);   // differs in k_o only
    functional_run(10);
    attack_unload(stream_b);
    chk(stream_a === stream_b, "scan unload after SE activity does not depend on the secret key");
    tpm_key = good;

    for (int i = 0; i < 30; i++) begin
      cycle(0, 0, '0, rnd_word(), rnd_word(), "test mode, SE low");
      chk(functional_mode === 1'b0, "no return to functional mode without chip reset");
      sticky++;
    end
    chk(m_key() == '0, "key register cleared after scan activity");

    cycle(1, 1, '0, '0, '0, "reset, SE high");
    cycle(0, 1, '0, '0, '0, "release, SE high");
    chk(functional_mode === 1'b0, "reset with SE high enters test mode");
    test_resets++;

    for (int r = 0; r < 8; r++) begin
      logic [N_DSN-1:0] eff;
      key_t k;
      automatic bit right = (r % 2 == 0);
      if (right) k = good; else do k = rnd_key(); while (k == good);
      scan_load({1'b0, word_t'(0), word_t'(0), rnd_word(), rnd_word()}, k, "scan load", eff);
      chk(m_key() == k, "model holds the shifted-in key");
      cycle(0, 0, '0, '0, '0, "capture");
      if (right) begin
        chk({c3, c2, c1} === locked_f(eff[DATA_W-1:0], eff[2*DATA_W-1:DATA_W], good),
            "correct key through scan gives correct outputs");
        debug_ops++;
      end else if ({c3, c2, c1} !== locked_f(eff[DATA_W-1:0], eff[2*DATA_W-1:DATA_W], good)) begin
        wrong_ops++;
      end
    end

    functional_run(20);

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
