// Testbench for inverter_column: random words, every output bit must be the
// inverse of its input bit.
module tb_inverter_column;
  localparam int unsigned W = 32;
  logic [W-1:0] din, dout;
  int checks = 0, failures = 0;

  inverter_column #(.W(W)) dut (.in_bits(din), .out_bits(dout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 200; t++) begin
      din = (t == 0) ? '0 : (t == 1) ? '1 : $urandom();
      #1;
      checks++;
      for (int b = 0; b < W; b++) if (dout[b] == din[b]) begin failures++; break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
