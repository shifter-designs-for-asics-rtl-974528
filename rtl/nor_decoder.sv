// Dynamic NOR decoder: turns the binary-coded shift amount into N word lines.
//
// Each word line is precharged high through a p-type transistor while the
// clock phi is low. While phi is high (evaluation) the line is discharged by
// an nMOS pull-down for every address literal that does not match the line's
// own number, so only the line whose number equals s_code stays high: line i
// is the NOR of the literals that mismatch i. Vertical buffers at the top of
// the array drive the true and the complemented address bits onto the
// pull-down gates.
//
// Interface: phi (high = evaluate, low = precharge), s_code[LOGN] binary shift
// amount, word_line[N] raw decoder lines.
//
// Timing: during precharge every line is 1; during evaluation exactly line
// s_code is 1. A discharged line cannot recover until the next precharge, so
// s_code must be stable while phi is high; the lines here are computed
// combinationally from phi and s_code under that rule. The NOR structure and
// clocking follow the published decoder; the evaluation footer is modelled only
// through its effect (no discharge while phi is low).
module nor_decoder #(
  parameter int unsigned N    = shifter_pkg::SHIFTER_WIDTH,
  parameter int unsigned LOGN = $clog2(N)
) (
  input  logic            phi,
  input  logic [LOGN-1:0] s_code,
  output logic [N-1:0]    word_line
);

  // Outputs of the vertical address buffers.
  logic [LOGN-1:0] addr_t;
  logic [LOGN-1:0] addr_c;

  assign addr_t = s_code;
  assign addr_c = ~s_code;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      logic pull_down;
      pull_down = 1'b0;
      for (int b = 0; b < LOGN; b++) begin
        // A line whose number has bit b = 0 is discharged by the true literal,
        // one with bit b = 1 by the complemented literal.
        pull_down |= ((i >> b) & 1) != 0 ? addr_c[b] : addr_t[b];
      end
      word_line[i] = phi ? ~pull_down : 1'b1;
    end
  end

endmodule
