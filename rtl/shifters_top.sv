// The four 32-bit circular right shifters side by side.
//
// All four perform the same operation, out = in rotated right by s_code
// places, and differ in structure and switch style:
//   b1: barrel shifter, nMOS pass transistors, dynamic decoder   (clocked)
//   b2: barrel shifter, transmission gates, dynamic decoder      (clocked)
//   l1: logarithmic shifter, pass transistor multiplexers        (combinational)
//   l2: logarithmic shifter, transmission gate multiplexers      (combinational)
// Each shifter has its own data and control ports so the four can be driven
// and compared independently; the two barrel shifters share the two-phase
// non-overlapping clock phi / phi_n, which has to be generated outside.
//
// Timing: the barrel outputs follow their inputs while phi is high and hold
// while phi is low; the logarithmic outputs follow their inputs at all times.
module shifters_top #(
  parameter int unsigned N    = shifter_pkg::SHIFTER_WIDTH,
  parameter int unsigned LOGN = $clog2(N)
) (
  input  logic            phi,
  input  logic            phi_n,

  input  logic [LOGN-1:0] b1_s_code,
  input  logic [N-1:0]    b1_in,
  output logic [N-1:0]    b1_out,

  input  logic [LOGN-1:0] b2_s_code,
  input  logic [N-1:0]    b2_in,
  output logic [N-1:0]    b2_out,

  input  logic [LOGN-1:0] l1_s_code,
  input  logic [N-1:0]    l1_in,
  output logic [N-1:0]    l1_out,

  input  logic [LOGN-1:0] l2_s_code,
  input  logic [N-1:0]    l2_in,
  output logic [N-1:0]    l2_out
);

  barrel_shifter_pt #(.N(N), .LOGN(LOGN)) u_barrel1 (
    .phi(phi), .phi_n(phi_n), .s_code(b1_s_code), .in_bits(b1_in), .out_bits(b1_out)
  );

  barrel_shifter_tg #(.N(N), .LOGN(LOGN)) u_barrel2 (
    .phi(phi), .phi_n(phi_n), .s_code(b2_s_code), .in_bits(b2_in), .out_bits(b2_out)
  );

  log_shifter_pt #(.N(N), .LOGN(LOGN)) u_log1 (
    .s_code(l1_s_code), .in_bits(l1_in), .out_bits(l1_out)
  );

  log_shifter_tg #(.N(N), .LOGN(LOGN)) u_log2 (
    .s_code(l2_s_code), .in_bits(l2_in), .out_bits(l2_out)
  );

endmodule
