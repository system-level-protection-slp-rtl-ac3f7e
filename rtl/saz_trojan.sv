// saz_trojan: stuck-at-zero (SAZ) hardware Trojan on one ALU output bit.
//
// The payload is a single AND gate inserted in the path of output bit
// TARGET_BIT: the gate's second input is the inverted trigger, so while
// trigger is high that bit is held at logic 0 and all other bits pass
// unchanged. Combinational, no clock. The AND-gate payload on one output
// bit follows the published Trojan; the active-high trigger port (inverted
// at the gate) and the choice of bit as a parameter are this design's own.
module saz_trojan
  import slp_pkg::*;
#(
  parameter int unsigned TARGET_BIT = 0
) (
  input  logic [DATA_W-1:0] d_in,     // clean ALU result
  input  logic              trigger,  // 1: Trojan active
  output logic [DATA_W-1:0] d_out     // result seen outside the IP core
);

  always_comb begin
    d_out             = d_in;
    d_out[TARGET_BIT] = d_in[TARGET_BIT] & ~trigger;
  end

endmodule
