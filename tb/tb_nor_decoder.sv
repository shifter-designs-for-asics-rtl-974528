// Testbench for nor_decoder: in precharge (phi = 0) every word line must be
// high; in evaluation (phi = 1) only the line numbered s_code.
module tb_nor_decoder;
  localparam int unsigned N = 32;
  logic         phi;
  logic [4:0]   code;
  logic [N-1:0] wl;
  int checks = 0, failures = 0;

  nor_decoder #(.N(N)) dut (.phi(phi), .s_code(code), .word_line(wl));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 3; rep++) begin
      for (int s = 0; s < N; s++) begin
        code = 5'(s);
        phi  = 1'b0;
        #5;
        checks++; if (wl !== '1) failures++;
        phi = 1'b1;
        #5;
        checks++;
        for (int i = 0; i < N; i++) if (wl[i] !== (i == s)) begin failures++; break; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
