// Crossbar switch: an N x N field of switches, one at each crossing of an
// input column and an output row.
//
// The switch at input i / output j connects input line i to output line j
// while conn[j][i] is 1 (it is the control C(i/j) of the classic pass
// transistor crossbar). Any input-to-output mapping can be set up this way,
// and the barrel shifter main fields are this crossbar with the controls wired
// diagonally.
//
// Interface: in_bits[N] inputs, conn[N][N] switch controls (row j, bit i),
// out_bits[N] output lines.
//
// Timing: combinational while a row has a closed switch. An output line with
// no closed switch is left floating in the circuit and keeps the charge it
// had; that storage is modelled here as a level-sensitive latch per output
// line, transparent while any switch of its row is closed (this is the one
// latch the tools report, and it is intended). If several switches of one row
// are closed at once the inputs fight on the line; this model resolves that
// as a wired OR, and the assertion below flags it because no shifter ever
// closes two switches of a row.
module crossbar_switch #(
  parameter int unsigned N = shifter_pkg::SHIFTER_WIDTH
) (
  input  logic [N-1:0]          in_bits,
  input  logic [N-1:0][N-1:0]   conn,
  output logic [N-1:0]          out_bits
);

  for (genvar j = 0; j < N; j++) begin : g_row
    logic driven;
    logic value;

    assign driven = |conn[j];
    assign value  = |(conn[j] & in_bits);

    // Charge kept on an undriven output line.
    always_latch begin
      if (driven) out_bits[j] = value;
    end

    always_comb begin : one_switch_per_row
      assert ($onehot0(conn[j]))
        else $error("crossbar_switch: several switches closed on output %0d", j);
    end
  end

endmodule
