// Testbench for log_stage: stages with shifts 1, 4 and 16 in both switch
// styles. With c = 0 the output is the inverted input; with c = 1 it is the
// inverted input rotated right by the stage's shift.
module tb_log_stage;
  localparam int unsigned N = 32;
  logic [N-1:0] din;
  logic         c;
  logic [N-1:0] o_pt1, o_pt4, o_tg4, o_tg16;
  int checks = 0, failures = 0;

  log_stage #(.N(N), .SHIFT(1),  .STYLE(shifter_pkg::PASS_TRANSISTOR))   d_pt1  (.in_bits(din), .c(c), .out_bits(o_pt1));
  log_stage #(.N(N), .SHIFT(4),  .STYLE(shifter_pkg::PASS_TRANSISTOR))   d_pt4  (.in_bits(din), .c(c), .out_bits(o_pt4));
  log_stage #(.N(N), .SHIFT(4),  .STYLE(shifter_pkg::TRANSMISSION_GATE)) d_tg4  (.in_bits(din), .c(c), .out_bits(o_tg4));
  log_stage #(.N(N), .SHIFT(16), .STYLE(shifter_pkg::TRANSMISSION_GATE)) d_tg16 (.in_bits(din), .c(c), .out_bits(o_tg16));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rot_inv(logic [N-1:0] x, int sh);
    logic [2*N-1:0] dbl;
    dbl = {x, x} >> sh;
    return ~dbl[N-1:0];
  endfunction

  initial begin
    for (int t = 0; t < 200; t++) begin
      din = $urandom();
      c   = t[0];
      #1;
      checks++; if (o_pt1  !== rot_inv(din, c ? 1  : 0)) failures++;
      checks++; if (o_pt4  !== rot_inv(din, c ? 4  : 0)) failures++;
      checks++; if (o_tg4  !== rot_inv(din, c ? 4  : 0)) failures++;
      checks++; if (o_tg16 !== rot_inv(din, c ? 16 : 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
