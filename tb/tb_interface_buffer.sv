// Testbench for interface_buffer: all four (clk, a) combinations against the
// output table (1, a') on the inverting and (a, 0) on the non-inverting output,
// for clk low and high respectively.
module tb_interface_buffer;
  logic clk, a, y, y_n;
  int checks = 0, failures = 0;

  interface_buffer dut (.clk(clk), .a(a), .out(y), .out_n(y_n));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_y, exp_yn;
    for (int rep = 0; rep < 3; rep++) begin
      for (int v = 0; v < 4; v++) begin
        clk = v[1];
        a   = v[0];
        #1;
        case ({clk, a})
          2'b00: begin exp_y = 1'b0; exp_yn = 1'b1; end
          2'b01: begin exp_y = 1'b1; exp_yn = 1'b1; end
          2'b10: begin exp_y = 1'b0; exp_yn = 1'b1; end
          default: begin exp_y = 1'b0; exp_yn = 1'b0; end
        endcase
        checks++; if (y !== exp_y) failures++;
        checks++; if (y_n !== exp_yn) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
