// Column of inverters that interfaces a shifter core with the datapath.
//
// Each bit is inverted once. The barrel shifters have one column at the input
// and one at the output of the main field, so the pair leaves the data in
// phase; the logarithmic shifters have one at the input, whose inversion is
// cancelled by the inverting multiplexer stages. In a real datapath these
// columns could be replaced by latches or another interface.
//
// Interface: in_bits[W], out_bits[W] = ~in_bits. Timing: combinational.
module inverter_column #(
  parameter int unsigned W = shifter_pkg::SHIFTER_WIDTH
) (
  input  logic [W-1:0] in_bits,
  output logic [W-1:0] out_bits
);

  assign out_bits = ~in_bits;

endmodule
