// patgen_parity: parity across the pattern outputs of all channels.
//
// Each clock in which the channels present a freshly generated bit (valid),
// parity is the XOR of the channel data bits, and 0 otherwise.  It serves as
// a parity bit when the patterns are sent as parallel data and, in BIST
// mode, as the pass/fail flag: self-test patterns are chosen so that the
// channel outputs always have even parity, so a 1 here marks an error.  The
// XOR across channels is the architecture's; using the data bits whatever
// the tri-state flags say, and gating with valid, are this design's choices.
// Purely combinational from the (registered) channel outputs.
module patgen_parity #(
  parameter int unsigned NUM_CH = 8
) (
  input  logic [NUM_CH-1:0] pat_d,
  input  logic              valid,
  output logic              parity
);

  assign parity = valid && (^pat_d);

endmodule
