// fmi_pkg: types shared by the functional mode isolation (FMI) logic.
//
// The FMI state machine has four states. FMI_RESET stands for the chip-reset
// node of the state diagram: the controller sits there while chip-reset is
// asserted and leaves it on the first clock edge after release. FMI_FUNC is
// functional mode (key taken from the tamper-proof memory), FMI_CLEAR is the
// transient state that clears the key register when scan activity is sensed,
// and FMI_TEST is test mode (key register loaded only through the scan
// chains). The state names follow the published state diagram; the binary
// encoding is this design's own choice.
package fmi_pkg;

  typedef enum logic [1:0] {
    FMI_RESET = 2'd0,
    FMI_FUNC  = 2'd1,
    FMI_CLEAR = 2'd2,
    FMI_TEST  = 2'd3
  } fmi_state_t;

endpackage
