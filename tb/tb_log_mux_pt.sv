// Testbench for log_mux_pt: every combination of s1, s2 and c (with c_n its
// complement); the output must be the inverse of s2 when c = 1 and of s1 when
// c = 0.
module tb_log_mux_pt;
  logic s1, s2, c, c_n, d;
  int checks = 0, failures = 0;

  log_mux_pt dut (.s1(s1), .s2(s2), .c(c), .c_n(c_n), .d(d));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 4; rep++) begin
      for (int v = 0; v < 8; v++) begin
        {c, s2, s1} = 3'(v);
        c_n = ~c;
        #1;
        checks++;
        if (d !== ~(c ? s2 : s1)) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
