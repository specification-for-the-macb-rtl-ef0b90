// macb_trigger_or -- ASIC Trigger fan-out and OR.
//
// Each FEE64 ORs the OR16 outputs of its four ASICs into one ASIC Trigger,
// which reaches the MACB on its HDMI port.  The MACB gives every port its own
// isolated Fast NIM output, and sends the OR of all four ports up through
// Port Next, so that at the root each Fast NIM output carries the OR of every
// FEE64 below that port.  Both functions are from the specification; sending
// the OR upwards in every mode (it is simply unused at the root) is this
// design's choice.
//
// Interface: combinational, no clock.
module macb_trigger_or
  import macb_pkg::*;
(
  input  logic [NUM_PORTS-1:0] port_trig,   // ASIC Trigger from ports 1..4
  output logic [NUM_PORTS-1:0] lemo_trig,   // Fast NIM outputs, one per port
  output logic                 next_trig    // OR of all ports, towards Port Next
);

  assign lemo_trig = port_trig;
  assign next_trig = |port_trig;

endmodule
