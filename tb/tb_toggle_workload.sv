// Switching-activity workload for shifters_top at its default size.
//
// Reproduces the kind of stimulus used to measure the shifters' dynamic power:
// a 20-unit clock (50 MHz if one unit is 1 ns) with data inputs that change
// every cycle, i.e. a 25 MHz square wave on every input bit. The data
// alternates between 55555555 and AAAAAAAA and the shift amount alternates
// between 0 and 2 (an even rotation keeps the pattern), so every output bit of
// every shifter must toggle in every cycle and every barrel decoder line used
// changes each cycle. The exact published power pattern is not known; this
// one is chosen to switch all output nodes. Checks each result and counts
// the output bit toggles (must be 32 per shifter per cycle).
module tb_toggle_workload;
  localparam int unsigned N = 32;
  localparam int unsigned NCYC = 200;

  logic         phi, phi_n;
  logic [4:0]   s;
  logic [N-1:0] din;
  logic [N-1:0] dout [4];
  int checks = 0, failures = 0;
  longint toggles [4];

  shifters_top dut (
    .phi(phi), .phi_n(phi_n),
    .b1_s_code(s), .b1_in(din), .b1_out(dout[0]),
    .b2_s_code(s), .b2_in(din), .b2_out(dout[1]),
    .l1_s_code(s), .l1_in(din), .l1_out(dout[2]),
    .l2_s_code(s), .l2_in(din), .l2_out(dout[3])
  );

  initial begin : watchdog
    #((NCYC + 10) * 20);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] prev [4];
    logic [N-1:0] expect_now;
    {phi, phi_n} = 2'b01;
    s = '0;
    din = 32'hAAAA_AAAA;
    #10 {phi, phi_n} = 2'b10;
    #10;
    for (int u = 0; u < 4; u++) begin
      prev[u] = dout[u];
      toggles[u] = 0;
    end
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      {phi, phi_n} = 2'b01;
      #2;
      din = cyc[0] ? 32'hAAAA_AAAA : 32'h5555_5555;
      s   = cyc[0] ? 5'd2 : 5'd0;
      expect_now = cyc[0] ? 32'hAAAA_AAAA : 32'h5555_5555;
      #8 {phi, phi_n} = 2'b10;
      #9;
      for (int u = 0; u < 4; u++) begin
        checks++; if (dout[u] !== expect_now) failures++;
        toggles[u] += $countones(dout[u] ^ prev[u]);
        prev[u] = dout[u];
      end
      #1;
    end
    for (int u = 0; u < 4; u++) begin
      checks++; if (toggles[u] != longint'(NCYC) * N) failures++;
    end
    $display("output toggles per shifter: %0d %0d %0d %0d", toggles[0], toggles[1], toggles[2], toggles[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
