// 32-bit logarithmic shifter with nMOS pass transistor multiplexers
// ("Logarithmic 1").
//
// Rotates in_bits right by the binary amount s_code: out[j] =
// in[(j + s_code) mod N]. The shift is split into LOGN stages; stage k is a
// column of 2:1 multiplexers that shifts by 2^k when control bit s_code[k] is
// 1 and passes the data straight on when it is 0. Because the control bits are
// already binary, no decoder is needed. An inverter column feeds the first
// stage, and every multiplexer cell inverts (a level-restoring buffer in the
// pass transistor cell). For N = 32 that is 1 + 5 inversions, so the output is
// in phase with the input, as in the published design. For a width whose
// stage count is even this model adds an output inverter column to keep the
// function; that column is not part of the published 32-bit circuit.
//
// Interface: s_code[LOGN], in_bits[N], out_bits[N]. No clock.
// Timing: purely combinational, one shift per evaluation of the inputs.
module log_shifter_pt #(
  parameter int unsigned N    = shifter_pkg::SHIFTER_WIDTH,
  parameter int unsigned LOGN = $clog2(N)
) (
  input  logic [LOGN-1:0] s_code,
  input  logic [N-1:0]    in_bits,
  output logic [N-1:0]    out_bits
);

  localparam shifter_pkg::switch_style_e STYLE = shifter_pkg::PASS_TRANSISTOR;

  logic [LOGN:0][N-1:0] stage_data;

  inverter_column #(.W(N)) u_in_col (
    .in_bits (in_bits),
    .out_bits(stage_data[0])
  );

  for (genvar k = 0; k < LOGN; k++) begin : g_stage
    log_stage #(.N(N), .SHIFT(2 ** k), .STYLE(STYLE)) u_stage (
      .in_bits (stage_data[k]),
      .c       (s_code[k]),
      .out_bits(stage_data[k+1])
    );
  end

  if (LOGN % 2 == 1) begin : g_in_phase
    assign out_bits = stage_data[LOGN];
  end else begin : g_reinvert
    inverter_column #(.W(N)) u_out_col (
      .in_bits (stage_data[LOGN]),
      .out_bits(out_bits)
    );
  end

endmodule
