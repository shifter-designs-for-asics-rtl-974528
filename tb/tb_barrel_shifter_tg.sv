// Testbench for barrel_shifter_tg at 32 bits, clocked with a 20-unit period
// (phi high for the second half of each cycle, phi_n its inverse).
// Every cycle, new data and a new shift amount are applied early in the
// precharge half. Checked: the output still holds the previous result at the
// end of precharge, the new result (in rotated right by s) is present one
// time unit into the same cycle's evaluation half and at its end, so a shift
// completes within the cycle it is applied in. The first four cycles replay
// I = 88888888 with S = 1, 2, 3, 4.
module tb_barrel_shifter_tg;
  localparam int unsigned N = 32;
  logic         phi, phi_n;
  logic [4:0]   s_code;
  logic [N-1:0] din, dout;
  int checks = 0, failures = 0;
  int cycles = 0, late = 0;

  barrel_shifter_tg dut (.phi(phi), .phi_n(phi_n), .s_code(s_code), .in_bits(din), .out_bits(dout));

  initial begin : watchdog
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rotr(logic [N-1:0] x, int sh);
    logic [2*N-1:0] dbl;
    dbl = {x, x} >> sh;
    return dbl[N-1:0];
  endfunction

  initial begin
    logic [N-1:0] prev, expect_now;
    logic [N-1:0] fig_out [4];
    fig_out = '{32'h4444_4444, 32'h2222_2222, 32'h1111_1111, 32'h8888_8888};
    // Initial cycle with S = 0 to define the output.
    {phi, phi_n} = 2'b01;
    s_code = '0;
    din = 32'h8888_8888;
    #10 {phi, phi_n} = 2'b10;
    #10;
    checks++; if (dout !== 32'h8888_8888) failures++;
    prev = dout;
    for (int cyc = 0; cyc < 500; cyc++) begin
      {phi, phi_n} = 2'b01;               // precharge half
      #2;
      if (cyc < 4) begin
        din = 32'h8888_8888;
        s_code = 5'(cyc + 1);
      end else begin
        din = $urandom();
        s_code = 5'($urandom_range(31, 0));
      end
      expect_now = (cyc < 4) ? fig_out[cyc] : rotr(din, int'(s_code));
      #7;
      checks++; if (dout !== prev) failures++;      // held through precharge
      #1 {phi, phi_n} = 2'b10;            // evaluation half
      #1;
      checks++;
      if (dout !== expect_now) begin failures++; late++; end
      #8;
      checks++; if (dout !== expect_now) failures++;
      #1;
      prev = dout;
      cycles++;
    end
    // Latency: every result appeared in the cycle it was applied in.
    checks++; if (late != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
