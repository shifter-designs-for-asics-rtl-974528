// Shared constants and types of the 32-bit shifter family.
//
// All four shifters (barrel and logarithmic, each with nMOS pass transistors or
// with CMOS transmission gates) perform an n x n circular right shift of an
// n-bit word by a binary-coded amount. The published designs are 32 bits wide,
// so SHIFTER_WIDTH is 32; every module takes its width as a parameter whose
// default is this constant.
//
// switch_style_e names the two switch styles. In a two-state logic model both
// styles compute the same function; they differ in the control wires a switch
// needs (one gate signal for an nMOS pass transistor, a complementary pair for
// a transmission gate) and in how a switch behaves when its controls are not
// complementary, which the switch-level modules model explicitly.
package shifter_pkg;

  localparam int unsigned SHIFTER_WIDTH = 32;

  typedef enum logic {
    PASS_TRANSISTOR   = 1'b0,
    TRANSMISSION_GATE = 1'b1
  } switch_style_e;

endpackage
