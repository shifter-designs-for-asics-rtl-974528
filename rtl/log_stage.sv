// One stage of the logarithmic shifter: a column of N 2:1 multiplexer cells,
// the switch field that feeds it and the vertical control buffers on top.
//
// The switch field routes the previous column's output m to the unshifted
// input s1 of cell m and to the shifted input s2 of cell (m - SHIFT) mod N, so
// cell j sees in[j] and in[(j + SHIFT) mod N]. The stage's coded control bit c
// passes through two inverters at the top of the column, which produce the
// complement c_n and a re-driven c for all cells. Each cell inverts, so
//   out[j] = ~(c ? in[(j + SHIFT) mod N] : in[j]),
// a circular right shift by SHIFT when c = 1, followed by inversion.
// STYLE chooses pass transistor or transmission gate cells.
//
// Interface: in_bits[N], c, out_bits[N]. Timing: combinational.
module log_stage #(
  parameter int unsigned               N     = shifter_pkg::SHIFTER_WIDTH,
  parameter int unsigned               SHIFT = 1,
  parameter shifter_pkg::switch_style_e STYLE = shifter_pkg::PASS_TRANSISTOR
) (
  input  logic [N-1:0] in_bits,
  input  logic         c,
  output logic [N-1:0] out_bits
);

  // Vertical control buffers: c -> c_n -> c_buf.
  logic c_n;
  logic c_buf;

  assign c_n   = ~c;
  assign c_buf = ~c_n;

  // Switch field.
  logic [N-1:0] s1;
  logic [N-1:0] s2;

  always_comb begin
    for (int m = 0; m < N; m++) begin
      s1[m] = in_bits[m];
      s2[m] = in_bits[(m + SHIFT) % N];
    end
  end

  for (genvar j = 0; j < N; j++) begin : g_cell
    if (STYLE == shifter_pkg::PASS_TRANSISTOR) begin : g_pt
      log_mux_pt u_mux (.s1(s1[j]), .s2(s2[j]), .c(c_buf), .c_n(c_n), .d(out_bits[j]));
    end else begin : g_tg
      log_mux_tg u_mux (.s1(s1[j]), .s2(s2[j]), .c(c_buf), .c_n(c_n), .d(out_bits[j]));
    end
  end

endmodule
