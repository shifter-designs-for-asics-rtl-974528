// Main field of the barrel shifter built from CMOS transmission gates.
//
// Same diagonal wiring as the pass transistor field: shift amount k closes the
// switch from input (j + k) mod N to output j, giving out[j] = in[(j + k) mod N].
// Each switch is a transmission gate whose nMOS device is driven by sel[k] and
// whose pMOS device is driven by the complementary line sel_n[k], so the field
// needs both polarities of every decoded control line.
//
// A transmission gate conducts when either of its devices is on, so the switch
// on diagonal k is modelled as closed when sel[k] is 1 or sel_n[k] is 0. With
// properly complementary controls this is simply sel[k].
//
// Interface: in_bits[N], sel[N] and sel_n[N] decoded shift amount (one-hot and
// its complement), out_bits[N].
//
// Timing: combinational while one diagonal is closed; with every switch open
// (sel all 0, sel_n all 1, the precharge phase) the outputs keep their value.
module barrel_field_tg #(
  parameter int unsigned N = shifter_pkg::SHIFTER_WIDTH
) (
  input  logic [N-1:0] in_bits,
  input  logic [N-1:0] sel,
  input  logic [N-1:0] sel_n,
  output logic [N-1:0] out_bits
);

  logic [N-1:0]        closed;
  logic [N-1:0][N-1:0] conn;

  assign closed = sel | ~sel_n;

  always_comb begin
    for (int j = 0; j < N; j++) begin
      for (int i = 0; i < N; i++) begin
        conn[j][i] = closed[(i + N - j) % N];
      end
    end
  end

  crossbar_switch #(.N(N)) u_xbar (
    .in_bits (in_bits),
    .conn    (conn),
    .out_bits(out_bits)
  );

endmodule
