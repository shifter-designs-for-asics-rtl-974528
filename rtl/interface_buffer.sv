// Interface clocked buffer between the dynamic decoder and the shifter field.
//
// One inverting stage (nMOS driven by the data input a) sits between a pMOS
// pull-up and an nMOS pull-down that are both gated by clk. The node above the
// data transistor is the inverting output, the node below it the
// non-inverting output:
//   out_n = 1 while clk is low,  ~a while clk is high;
//   out   = a while clk is low,   0 while clk is high.
// So each output is forced to a safe level in one clock phase and carries the
// data in the other. Driven by phi', the non-inverting output holds the field
// switches' nMOS gates low during the decoder's precharge; driven by phi, the
// inverting output holds the pMOS gates high. Without these buffers every
// precharged word line would close its switch in the precharge phase.
//
// Interface: clk, a, out (non-inverting), out_n (inverting). One bit wide;
// a design uses only the output it needs.
//
// Timing: combinational. The two outputs and their forced values follow the
// published buffer; the forced value of a node that is only charge-held in the
// circuit (for example out while clk is low and a is 0) is modelled as the
// logic value it settles to.
module interface_buffer (
  input  logic clk,
  input  logic a,
  output logic out,
  output logic out_n
);

  assign out_n = clk ? ~a   : 1'b1;
  assign out   = clk ? 1'b0 : a;

endmodule
