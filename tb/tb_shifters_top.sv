// End-to-end testbench for shifters_top at its default size (four 32-bit
// shifters), clocked with a 20-unit period (phi high in the second half,
// phi_n its inverse).
//
// Every cycle each of the four shifters gets its own random data and shift
// amount early in the precharge half. The barrel outputs must hold their
// previous result through precharge and show the new rotation during the same
// cycle's evaluation half; the logarithmic outputs must show the new rotation
// as soon as their inputs change. The first cycles replay I = 88888888 with
// S = 1..4 on all four shifters. Then every shift amount is forced once per
// shifter so that each is seen.
//
// Mechanisms counted (a failure if one never happens): each of the 32 shift
// amounts on each shifter; barrel evaluation phases; barrel outputs held
// through a precharge while their inputs changed; every logarithmic stage both
// shifting (control bit 1) and passing straight (control bit 0).
module tb_shifters_top;
  localparam int unsigned N = 32;
  localparam int unsigned NCYC = 400;

  logic         phi, phi_n;
  logic [4:0]   s [4];
  logic [N-1:0] din [4];
  logic [N-1:0] dout [4];
  int checks = 0, failures = 0;

  int amount_seen [4][N];
  int evaluations = 0, holds = 0;
  int stage_shift [5], stage_pass [5];

  shifters_top dut (
    .phi(phi), .phi_n(phi_n),
    .b1_s_code(s[0]), .b1_in(din[0]), .b1_out(dout[0]),
    .b2_s_code(s[1]), .b2_in(din[1]), .b2_out(dout[1]),
    .l1_s_code(s[2]), .l1_in(din[2]), .l1_out(dout[2]),
    .l2_s_code(s[3]), .l2_in(din[3]), .l2_out(dout[3])
  );

  initial begin : watchdog
    #((NCYC + 10) * 20);
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
    logic [N-1:0] prev [4];
    logic [N-1:0] expect_now [4];
    logic [N-1:0] fig_out [4];
    fig_out = '{32'h4444_4444, 32'h2222_2222, 32'h1111_1111, 32'h8888_8888};
    foreach (amount_seen[u, a]) amount_seen[u][a] = 0;
    foreach (stage_shift[k]) begin stage_shift[k] = 0; stage_pass[k] = 0; end

    // Settling cycle with S = 0.
    {phi, phi_n} = 2'b01;
    for (int u = 0; u < 4; u++) begin s[u] = '0; din[u] = 32'h8888_8888; end
    #10 {phi, phi_n} = 2'b10;
    #10;
    for (int u = 0; u < 4; u++) begin
      checks++; if (dout[u] !== 32'h8888_8888) failures++;
      prev[u] = dout[u];
    end

    for (int cyc = 0; cyc < NCYC; cyc++) begin
      {phi, phi_n} = 2'b01;                          // precharge half
      #2;
      for (int u = 0; u < 4; u++) begin
        if (cyc < 4) begin
          din[u] = 32'h8888_8888;
          s[u]   = 5'(cyc + 1);
        end else if (cyc < 4 + N) begin
          din[u] = $urandom();
          s[u]   = 5'((cyc - 4 + 7 * u) % N);        // every amount on every shifter
        end else begin
          din[u] = $urandom();
          s[u]   = 5'($urandom_range(N - 1, 0));
        end
        expect_now[u] = rotr(din[u], int'(s[u]));
        if (cyc < 4) begin
          checks++; if (expect_now[u] !== fig_out[cyc]) failures++;
        end
        amount_seen[u][s[u]]++;
      end
      for (int u = 2; u < 4; u++)
        for (int k = 0; k < 5; k++)
          if (s[u][k]) stage_shift[k]++; else stage_pass[k]++;
      #1;
      // Logarithmic shifters: combinational.
      for (int u = 2; u < 4; u++) begin
        checks++; if (dout[u] !== expect_now[u]) failures++;
      end
      #6;
      // Barrel shifters: still the previous result.
      for (int u = 0; u < 2; u++) begin
        checks++;
        if (dout[u] !== prev[u]) failures++;
        else if (din[u] !== prev[u] || expect_now[u] !== prev[u]) holds++;
      end
      #1 {phi, phi_n} = 2'b10;                       // evaluation half
      evaluations++;
      #1;
      for (int u = 0; u < 2; u++) begin
        checks++; if (dout[u] !== expect_now[u]) failures++;
      end
      #8;
      for (int u = 0; u < 4; u++) begin
        checks++; if (dout[u] !== expect_now[u]) failures++;
        prev[u] = dout[u];
      end
      #1;
    end

    // Mechanism coverage.
    for (int u = 0; u < 4; u++)
      for (int a = 0; a < N; a++) begin
        checks++; if (amount_seen[u][a] == 0) failures++;
      end
    checks++; if (evaluations == 0) failures++;
    checks++; if (holds == 0) failures++;
    for (int k = 0; k < 5; k++) begin
      checks++; if (stage_shift[k] == 0) failures++;
      checks++; if (stage_pass[k] == 0) failures++;
    end
    $display("coverage: evaluations=%0d barrel_holds=%0d stage_shift=%0d/%0d/%0d/%0d/%0d",
             evaluations, holds, stage_shift[0], stage_shift[1], stage_shift[2],
             stage_shift[3], stage_shift[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
