// Testbench for restoring_buffer: a single cell (default width) and a
// 32-bit column must both act as inverters.
module tb_restoring_buffer;
  logic        a, y;
  logic [31:0] va, vy;
  int checks = 0, failures = 0;

  restoring_buffer dut1 (.in_bits(a), .out_bits(y));
  restoring_buffer #(.W(32)) dut32 (.in_bits(va), .out_bits(vy));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 100; t++) begin
      a  = t[0];
      va = $urandom();
      #1;
      checks++; if (y !== (a ? 1'b0 : 1'b1)) failures++;
      checks++; if ((vy ^ va) !== 32'hFFFF_FFFF) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
