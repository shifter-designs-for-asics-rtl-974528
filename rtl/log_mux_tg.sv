// Multiplexer cell of the logarithmic shifter, transmission gate version.
//
// Two CMOS transmission gates join inputs s1 and s2 on one node. The gate on
// s2 has its nMOS device driven by c and its pMOS device by c_n; the gate on
// s1 the other way round. A gate conducts when either device is on, so s2 is
// connected while c = 1 or c_n = 0, and s1 while c_n = 1 or c = 0. An
// inverting output buffer follows:
//   d = ~(c ? s2 : s1)   for a complementary control pair.
//
// Interface: s1, s2 data inputs, c and c_n column control pair, d inverted
// output. Timing: combinational.
module log_mux_tg (
  input  logic s1,
  input  logic s2,
  input  logic c,
  input  logic c_n,
  output logic d
);

  logic pass_s2;
  logic pass_s1;
  logic node;

  assign pass_s2 = c | ~c_n;
  assign pass_s1 = c_n | ~c;
  assign node    = (pass_s2 & s2) | (pass_s1 & s1);
  assign d       = ~node;

  always_comb begin : complementary_control
    assert (c != c_n) else $error("log_mux_tg: control pair not complementary");
  end

endmodule
