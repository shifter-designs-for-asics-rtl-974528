// Testbench for log_shifter_tg: the 32-bit shifter for every shift amount with
// random data, the sequence I = 88888888 with S = 1..4, and an exhaustive run
// of a 16-bit (even stage count) and an 8-bit instance. The reference is the
// low half of {in, in} >> s.
module tb_log_shifter_tg;
  logic [31:0] din32, dout32;
  logic [4:0]  s32;
  logic [15:0] din16, dout16;
  logic [3:0]  s16;
  logic [7:0]  din8, dout8;
  logic [2:0]  s8;
  int checks = 0, failures = 0;

  log_shifter_tg dut32 (.s_code(s32), .in_bits(din32), .out_bits(dout32));
  log_shifter_tg #(.N(16)) dut16 (.s_code(s16), .in_bits(din16), .out_bits(dout16));
  log_shifter_tg #(.N(8))  dut8  (.s_code(s8),  .in_bits(din8),  .out_bits(dout8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] rotr32(logic [31:0] x, int sh);
    logic [63:0] dbl;
    dbl = {x, x} >> sh;
    return dbl[31:0];
  endfunction

  initial begin
    logic [31:0] fig_out [4];
    logic [31:0] dbl16;
    logic [15:0] dbl8;
    fig_out = '{32'h4444_4444, 32'h2222_2222, 32'h1111_1111, 32'h8888_8888};
    din32 = 32'h8888_8888;
    for (int s = 1; s <= 4; s++) begin
      s32 = 5'(s);
      #1;
      checks++; if (dout32 !== fig_out[s-1]) failures++;
    end
    for (int rep = 0; rep < 20; rep++) begin
      for (int s = 0; s < 32; s++) begin
        din32 = $urandom();
        s32   = 5'(s);
        din16 = 16'($urandom());
        s16   = 4'(s);
        din8  = 8'($urandom());
        s8    = 3'(s);
        #1;
        checks++; if (dout32 !== rotr32(din32, s)) failures++;
        dbl16 = {din16, din16} >> (s % 16);
        checks++; if (dout16 !== dbl16[15:0]) failures++;
        dbl8 = {din8, din8} >> (s % 8);
        checks++; if (dout8 !== dbl8[7:0]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
