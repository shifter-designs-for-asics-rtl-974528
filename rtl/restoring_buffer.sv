// Output level-restoring buffer for pass transistor logic.
//
// An nMOS pass transistor passes a high level only up to VDD minus a
// threshold voltage. The buffer is an inverter whose input also has a pMOS
// feedback transistor, gated by the inverter output, that pulls the input to
// VDD once the output has gone low, so no intermediate level persists. Its
// logic function is that of an inverter; the restoration of the analog level
// has no counterpart in a two-state model.
//
// Interface: in_bits[W] (the pass transistor node), out_bits[W] = ~in_bits.
// Timing: combinational. Used after the pass transistor barrel field (W = N)
// and inside each pass transistor multiplexer cell (W = 1).
module restoring_buffer #(
  parameter int unsigned W = 1
) (
  input  logic [W-1:0] in_bits,
  output logic [W-1:0] out_bits
);

  // The feedback transistor only reinforces a high level on the input node and
  // never changes its logic value, so the cell reduces to an inverter here.
  assign out_bits = ~in_bits;

endmodule
