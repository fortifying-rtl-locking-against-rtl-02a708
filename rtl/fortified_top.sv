// fortified_top: RTL locking fortified with functional mode isolation.
//
// The design under protection (locked_design) has its confidential constant,
// one operation and one branch condition hidden behind a locking key. The key
// is not wired from the tamper-proof memory (TPM) straight into the logic: it
// comes from a key register whose cells sit in the scan chains next to the
// design's own flip-flops. The FMI controller loads that register from the TPM
// right after chip reset when scan-enable is low (functional mode, correct
// outputs). As soon as scan-enable is seen high in functional mode the key
// register is cleared before any shift can move a key bit, and the chip stays
// in test mode, with whatever key the tester shifts in, until the next chip
// reset. A tester or end user can therefore use scan freely for structural
// test, but can never combine scan access with the secret key, which is what
// oracle-guided key-recovery attacks need.
//
// Scan structure: scan_in pins -> scan_decompressor -> N_CHAINS chains ->
// scan_compactor -> scan_out pins. The 4*DATA_W+1 design cells and the
// KEY_W = DATA_W+2 key cells occupy the slots of one cell vector; slot j lies
// in chain j % N_CHAINS at position j / N_CHAINS (position 0 is fed by the
// decompressor, the last cell of a chain feeds the compactor). The key cells
// take, in bit order, the slots of the middle rows that lie on chains fed by a
// single scan-in pin (chains 0, 1, 3, 7, ..., whose decompressor code i + 1
// is a power of two); the design cells fill every other slot in order. A
// trusted user can therefore shift any key, the correct one included, into
// the key register in test mode. With the defaults the 43 cells form chains of
// 15, 14 and 14 cells, and the ten key cells sit in slots
// 15, 16, 18, 19, 21, 22, 24, 25, 27 and 28 of chains 0 and 1.
//
// Timing: a and b are sampled at one rising edge and c1..c3 show the result
// after the next one (two-edge latency). functional_mode is high while the
// FMI controller is in functional mode. chip_rst is active high and
// asynchronous. tpm_key is the content of the tamper-proof memory, which is a
// macro outside this RTL.
//
// The overall arrangement follows the published integrated architecture. The
// chain count, the pin counts, the slot order and the functional_mode status
// output are this design's own choices; the text allows key cells anywhere in
// the chains.
module fortified_top #(
  parameter int unsigned DATA_W     = 8,
  parameter int unsigned N_SCAN_IN  = 2,
  parameter int unsigned N_CHAINS   = 3,
  parameter int unsigned N_SCAN_OUT = 2,
  localparam int unsigned KEY_W   = DATA_W + 2,
  localparam int unsigned N_DSN   = 4 * DATA_W + 1,
  localparam int unsigned N_CELLS = N_DSN + KEY_W
) (
  input  logic                  clk,
  input  logic                  chip_rst,
  input  logic                  se,
  input  logic [KEY_W-1:0]      tpm_key,
  input  logic [DATA_W-1:0]     a,
  input  logic [DATA_W-1:0]     b,
  input  logic [N_SCAN_IN-1:0]  scan_in,
  output logic [N_SCAN_OUT-1:0] scan_out,
  output logic [DATA_W-1:0]     c1,
  output logic [DATA_W-1:0]     c2,
  output logic                  c3,
  output logic                  functional_mode
);

  import fmi_pkg::*;

  fmi_state_t         fmi_state;
  logic               key_clear, key_load, key_scan_en;
  logic [KEY_W-1:0]   key, key_si, key_so;
  logic [N_DSN-1:0]   dsn_cells, dsn_si;
  logic [N_CELLS-1:0] all_q, all_si;
  logic [N_CHAINS-1:0] chain_in, chain_out;

  fmi_controller u_fmi (
    .clk       (clk),
    .chip_rst  (chip_rst),
    .se        (se),
    .key_clear (key_clear),
    .key_load  (key_load),
    .key_scan_en (key_scan_en),
    .state     (fmi_state)
  );

  key_register #(.KEY_W(KEY_W)) u_kr (
    .clk      (clk),
    .chip_rst (chip_rst),
    .se       (se),
    .clear    (key_clear),
    .load     (key_load),
    .scan_en  (key_scan_en),
    .tpm_key  (tpm_key),
    .scan_si  (key_si),
    .key      (key),
    .scan_so  (key_so)
  );

  locked_design #(.DATA_W(DATA_W)) u_dsn (
    .clk      (clk),
    .chip_rst (chip_rst),
    .se       (se),
    .a        (a),
    .b        (b),
    .key      (key),
    .scan_si  (dsn_si),
    .cells    (dsn_cells),
    .c1       (c1),
    .c2       (c2),
    .c3       (c3)
  );

  scan_decompressor #(.N_SCAN_IN(N_SCAN_IN), .N_CHAINS(N_CHAINS)) u_decomp (
    .scan_in  (scan_in),
    .chain_in (chain_in)
  );

  scan_compactor #(.N_CHAINS(N_CHAINS), .N_SCAN_OUT(N_SCAN_OUT)) u_comp (
    .chain_out (chain_out),
    .scan_out  (scan_out)
  );

  // ---- Slot map: which cell sits in which chain slot -----------------------
  localparam int unsigned ROWS      = (N_CELLS + N_CHAINS - 1) / N_CHAINS;
  localparam int unsigned FREE_ROW  = $clog2(N_CHAINS + 1);
  localparam int unsigned KEY_ROWS  = (KEY_W + FREE_ROW - 1) / FREE_ROW;
  localparam int unsigned KEY_START = N_CHAINS * ((ROWS - KEY_ROWS) / 2);

  // Chain c is driven by a single scan-in pin when its code c + 1 is a power of two.
  function automatic bit single_pin_chain(int unsigned c);
    return ((c + 1) & c) == 0;
  endfunction

  // Key bit held by slot j, or -1 for a design cell.
  function automatic int key_bit_of_slot(int unsigned j);
    int unsigned n = 0;
    for (int unsigned s = KEY_START; s < N_CELLS; s++) begin
      if (single_pin_chain(s % N_CHAINS)) begin
        if (s == j) return (n < KEY_W) ? int'(n) : -1;
        n++;
      end
    end
    return -1;
  endfunction

  // Design cell held by slot j (valid when the slot holds no key bit).
  function automatic int unsigned dsn_bit_of_slot(int unsigned j);
    int unsigned n = 0;
    for (int unsigned s = 0; s < j; s++) if (key_bit_of_slot(s) < 0) n++;
    return n;
  endfunction

  for (genvar j = 0; j < N_CELLS; j++) begin : g_slot
    localparam int KB = key_bit_of_slot(j);
    localparam int unsigned DB = dsn_bit_of_slot(j);
    if (KB >= 0) begin : g_key
      assign all_q[j]   = key_so[KB];
      assign key_si[KB] = all_si[j];
    end else begin : g_dsn
      assign all_q[j]   = dsn_cells[DB];
      assign dsn_si[DB] = all_si[j];
    end
    if (j < N_CHAINS) begin : g_head
      assign all_si[j] = chain_in[j];
    end else begin : g_body
      assign all_si[j] = all_q[j - N_CHAINS];
    end
  end

  for (genvar c = 0; c < N_CHAINS; c++) begin : g_tail
    localparam int unsigned LAST = c + N_CHAINS * ((N_CELLS - 1 - c) / N_CHAINS);
    assign chain_out[c] = all_q[LAST];
  end

  assign functional_mode = (fmi_state == FMI_FUNC);

  // No key bit may reach a scan chain outside the reset and test states.
  assert property (@(posedge clk) disable iff (chip_rst)
                   (fmi_state == FMI_FUNC || fmi_state == FMI_CLEAR) |-> key_so == '0)
    else $error("fortified_top: key visible on the scan chains outside test mode");

endmodule
