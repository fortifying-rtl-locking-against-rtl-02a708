// key_register: the key register (KR) that drives the key input of the locked
// design.
//
// Each bit is a key scan cell: a flip-flop with a synchronous clear, a
// parallel load from the tamper-proof memory and a scan input. The cells are
// not chained inside this module; every bit has its own scan input scan_si[i]
// and scan output scan_so[i] so that the surrounding design can stitch the key
// cells into any of its scan chains, wherever layout puts them. scan_so is the
// key when scan_en is high and 0 otherwise, so that outside test mode no key
// bit can travel down a chain. key drives the locked design directly.
//
// Per rising clock edge, in priority order: chip_rst (asynchronous) or clear
// empties the register; load copies tpm_key; scan_en with se high takes
// scan_si;
// otherwise the register holds (also during a test-mode capture cycle, so the
// key is never refreshed from the tamper-proof memory outside functional
// mode). The commands come from fmi_controller.
//
// The role of the key register, its clearing on scan activity and its place
// in the scan chains follow the published architecture. The default width of
// 128 bits is the key size of the published case study; the bit-level cell
// behaviour, the masked scan outputs and the hold in capture cycles are this
// design's own choices.
module key_register #(
  parameter int unsigned KEY_W = 128
) (
  input  logic             clk,
  input  logic             chip_rst,
  input  logic             se,
  input  logic             clear,
  input  logic             load,
  input  logic             scan_en,
  input  logic [KEY_W-1:0] tpm_key,
  input  logic [KEY_W-1:0] scan_si,
  output logic [KEY_W-1:0] key,
  output logic [KEY_W-1:0] scan_so
);

  always_ff @(posedge clk or posedge chip_rst) begin
    if (chip_rst)          key <= '0;
    else if (clear)        key <= '0;
    else if (load)         key <= tpm_key;
    else if (scan_en && se) key <= scan_si;
  end

  // Scan outputs toward the next cell of each chain: masked unless the key
  // cells belong to the chains (test mode).
  assign scan_so = scan_en ? key : '0;

endmodule
