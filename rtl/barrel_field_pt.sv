// Main field of the barrel shifter built from nMOS pass transistors.
//
// This is the crossbar switch with its gates wired along diagonals: decoded
// control line sel[k] closes the switch from input (j + k) mod N to output j
// for every output j, so with exactly one line high the field rotates its
// input right by k places: out[j] = in[(j + k) mod N]. Each switch is a single
// nMOS transistor, so only the positive control lines are needed.
//
// Interface: in_bits[N], sel[N] one-hot decoded shift amount, out_bits[N].
//
// Timing: combinational from in_bits and sel while one sel line is high.
// While all sel lines are low (the decoder's precharge phase) no switch
// conducts and each output line keeps its last value (see crossbar_switch).
// The diagonal wiring follows the published field; the one-hot rule on sel is
// checked by the crossbar's assertion.
module barrel_field_pt #(
  parameter int unsigned N = shifter_pkg::SHIFTER_WIDTH
) (
  input  logic [N-1:0] in_bits,
  input  logic [N-1:0] sel,
  output logic [N-1:0] out_bits
);

  logic [N-1:0][N-1:0] conn;

  // Switch from input i to output j is gated by sel[(i - j) mod N].
  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        conn[j][i] = sel[(i + N - j) % N];
      end
    end
  end

  crossbar_switch #(.N(N)) u_xbar (
    .in_bits (in_bits),
    .conn    (conn),
    .out_bits(out_bits)
  );

endmodule
