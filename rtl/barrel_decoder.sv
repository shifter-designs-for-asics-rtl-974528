// Control decoder of the barrel shifters: dynamic NOR decoder plus a row of
// interface clocked buffers.
//
// The binary shift amount s_code is decoded by the precharged NOR decoder into
// N word lines. Each word line feeds a non-inverting interface buffer clocked
// by phi_n, giving sel (0 during precharge, the word line during evaluation).
// With COMPLEMENT set, each word line also feeds an inverting interface buffer
// clocked by phi, giving sel_n (1 during precharge, the inverted word line
// during evaluation) for the pMOS side of transmission gates. The pass
// transistor shifter uses only the non-inverting buffers (COMPLEMENT = 0);
// sel_n is then all ones, meaning no pMOS gate is ever turned on.
//
// Interface: phi, phi_n two-phase non-overlapping clock (phi high =
// evaluate), s_code[LOGN], sel[N], sel_n[N].
//
// Timing: during evaluation (phi = 1, phi_n = 0) sel is one-hot at s_code and
// sel_n is its complement; during precharge (phi = 0, phi_n = 1) sel = 0 and
// sel_n = all ones. s_code must be stable while phi is high.
module barrel_decoder #(
  parameter int unsigned N          = shifter_pkg::SHIFTER_WIDTH,
  parameter int unsigned LOGN       = $clog2(N),
  parameter bit          COMPLEMENT = 1'b1
) (
  input  logic            phi,
  input  logic            phi_n,
  input  logic [LOGN-1:0] s_code,
  output logic [N-1:0]    sel,
  output logic [N-1:0]    sel_n
);

  logic [N-1:0] word_line;

  nor_decoder #(.N(N), .LOGN(LOGN)) u_nor (
    .phi      (phi),
    .s_code   (s_code),
    .word_line(word_line)
  );

  for (genvar i = 0; i < N; i++) begin : g_buf
    interface_buffer u_buf_p (
      .clk  (phi_n),
      .a    (word_line[i]),
      .out  (sel[i]),
      .out_n()
    );

    if (COMPLEMENT) begin : g_comp
      interface_buffer u_buf_n (
        .clk  (phi),
        .a    (word_line[i]),
        .out  (),
        .out_n(sel_n[i])
      );
    end else begin : g_no_comp
      assign sel_n[i] = 1'b1;
    end
  end

endmodule
