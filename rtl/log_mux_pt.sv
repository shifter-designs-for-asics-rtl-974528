// Multiplexer cell of the logarithmic shifter, nMOS pass transistor version.
//
// Two nMOS pass transistors join inputs s1 and s2 on one node: the transistor
// on s2 is gated by the column control c, the one on s1 by its complement c_n.
// The node drives a level-restoring buffer, so the cell output is inverted:
//   d = ~(c ? s2 : s1).
// In the shifter, s1 carries the unshifted bit and s2 the bit 2^k places
// higher, so c = 1 selects the shift.
//
// Interface: s1, s2 data inputs, c and c_n column control pair (from the
// column's vertical buffers), d inverted output.
//
// Timing: combinational. With a proper control pair exactly one transistor
// conducts; if both conducted the inputs would fight, which this model
// resolves as a wired OR and the assertion flags.
module log_mux_pt (
  input  logic s1,
  input  logic s2,
  input  logic c,
  input  logic c_n,
  output logic d
);

  logic node;

  assign node = (c & s2) | (c_n & s1);

  restoring_buffer #(.W(1)) u_restore (
    .in_bits (node),
    .out_bits(d)
  );

  always_comb begin : complementary_control
    assert (c != c_n) else $error("log_mux_pt: control pair not complementary");
  end

endmodule
