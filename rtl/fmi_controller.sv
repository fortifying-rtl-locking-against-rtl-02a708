// fmi_controller: the functional mode isolation (FMI) state machine.
//
// It watches the scan-enable pin and decides where the key register takes its
// value from. While chip_rst is high the key register is held cleared. On the
// first clock edge after chip_rst falls the controller enters functional mode
// if se is low (the key register loads the secret key from the tamper-proof
// memory at that same edge) or test mode if se is high (the key register keeps
// its cleared value and is reachable only through scan shifting). Any se
// activity in functional mode makes key_clear high in that very cycle, so the
// edge that would have performed the first shift clears the key register
// instead; the controller then passes through FMI_CLEAR into FMI_TEST. Test
// mode is left only by another chip_rst, so the secret key can never be
// observed or reused once scan has been touched.
//
// Interface: chip_rst is an active-high asynchronous reset. key_clear and
// key_load are combinational commands for the next rising clock edge.
// key_scan_en is high only in FMI_RESET and FMI_TEST: only then are the key
// cells connected to the scan chains (they shift when se is high and their
// scan outputs are visible). In functional mode the key cells' scan outputs
// read 0, so the edge on which se is first seen, which clears the key
// register, cannot move a key bit into the next cell of the chain either.
// state is the registered FSM state.
//
// The states, their transitions and the key-register actions follow the
// published state diagram and operation table. Two points are this design's
// own: FMI_CLEAR stays put while se is low (the diagram only shows its exit on
// SE, and only a chip reset may restore functional mode), the key is cleared
// combinationally in the FMI_FUNC cycle in which se is first seen, and the
// key cells' scan outputs are masked outside test mode.
//
// chip_rst is used both as the asynchronous reset and as the disable
// condition of the two assertions below; lint tools may note that the same
// net is sampled both ways, which is intended.
module fmi_controller
  import fmi_pkg::*;
(
  input  logic       clk,
  input  logic       chip_rst,
  input  logic       se,
  output logic       key_clear,
  output logic       key_load,
  output logic       key_scan_en,
  output fmi_state_t state
);

  fmi_state_t state_d;

  always_ff @(posedge clk or posedge chip_rst) begin
    if (chip_rst) state <= FMI_RESET;
    else          state <= state_d;
  end

  always_comb begin
    state_d = state;
    unique case (state)
      FMI_RESET: state_d = se ? FMI_TEST : FMI_FUNC;
      FMI_FUNC:  if (se) state_d = FMI_CLEAR;
      FMI_CLEAR: if (se) state_d = FMI_TEST;
      FMI_TEST:  state_d = FMI_TEST;
      default:   state_d = FMI_RESET;
    endcase
  end

  // Key-register commands for the next clock edge.
  always_comb begin
    key_clear = (state == FMI_FUNC && se) || (state == FMI_CLEAR);
    key_load  = (state == FMI_RESET) && !se;
    key_scan_en = (state == FMI_RESET) || (state == FMI_TEST);
  end

  // The three commands are mutually exclusive.
  assert property (@(posedge clk) disable iff (chip_rst)
                   $onehot0({key_clear, key_load, key_scan_en && se}))
    else $error("fmi_controller: more than one key-register command");

  // Once out of functional mode, only chip_rst brings it back.
  assert property (@(posedge clk) disable iff (chip_rst)
                   (state == FMI_CLEAR || state == FMI_TEST) |=> state != FMI_FUNC)
    else $error("fmi_controller: returned to functional mode without chip reset");

endmodule
