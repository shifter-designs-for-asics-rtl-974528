// 32-bit barrel shifter with CMOS transmission gates ("Barrel 2").
//
// Rotates in_bits right by the binary amount s_code in one clock cycle:
// out[j] = in[(j + s_code) mod N]. The data path is an input inverter column,
// the transmission gate main field (a crossbar with diagonal control lines)
// and an output inverter column; the two inversions cancel. Each transmission
// gate needs a complementary control pair, so the dynamic NOR decoder drives
// both a non-inverting interface buffer (clocked by phi_n, nMOS side) and an
// inverting one (clocked by phi, pMOS side) per line. Transmission gates pass
// both levels fully, so plain inverters suffice at the output.
//
// Interface: phi, phi_n two-phase non-overlapping clock; s_code[LOGN] shift
// amount; in_bits[N]; out_bits[N].
//
// Timing: while phi is low (precharge) the decoder lines charge high, every
// switch is held open and out_bits keeps the previous result. While phi is
// high (evaluation) exactly one diagonal of switches closes and out_bits
// follows in_bits rotated by s_code. A new shift amount is thus applied once
// per clock cycle and its result is valid in that cycle's evaluation phase.
// s_code must be stable while phi is high, and phi and phi_n must never be
// high together (asserted). The structure follows the published circuit; the
// charge held on the field outputs is modelled as a latch (see
// crossbar_switch).
module barrel_shifter_tg #(
  parameter int unsigned N    = shifter_pkg::SHIFTER_WIDTH,
  parameter int unsigned LOGN = $clog2(N)
) (
  input  logic            phi,
  input  logic            phi_n,
  input  logic [LOGN-1:0] s_code,
  input  logic [N-1:0]    in_bits,
  output logic [N-1:0]    out_bits
);

  logic [N-1:0] in_inv;
  logic [N-1:0] sel;
  logic [N-1:0] sel_n;
  logic [N-1:0] field_out;

  inverter_column #(.W(N)) u_in_col (
    .in_bits (in_bits),
    .out_bits(in_inv)
  );

  barrel_decoder #(.N(N), .LOGN(LOGN), .COMPLEMENT(1'b1)) u_dec (
    .phi   (phi),
    .phi_n (phi_n),
    .s_code(s_code),
    .sel   (sel),
    .sel_n (sel_n)
  );

  barrel_field_tg #(.N(N)) u_field (
    .in_bits (in_inv),
    .sel     (sel),
    .sel_n   (sel_n),
    .out_bits(field_out)
  );

  inverter_column #(.W(N)) u_out_col (
    .in_bits (field_out),
    .out_bits(out_bits)
  );

  always_comb begin : clocks_nonoverlapping
    assert (!(phi && phi_n)) else $error("barrel_shifter_tg: phi and phi_n overlap");
  end

endmodule
