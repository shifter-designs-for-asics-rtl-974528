// shifters_top at the other common datapath width, 64 bits (6-bit shift
// amount). The logarithmic shifters then have an even number of stages and
// use their extra output inverter column. All four shifters get random data
// with every shift amount 0..63 once, then random amounts; the barrel outputs
// are checked at the end of precharge (held) and in evaluation (new result).
module tb_width_64;
  localparam int unsigned N = 64;
  localparam int unsigned NCYC = 200;

  logic         phi, phi_n;
  logic [5:0]   s [4];
  logic [N-1:0] din [4];
  logic [N-1:0] dout [4];
  int checks = 0, failures = 0;

  shifters_top #(.N(N)) dut (
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
    {phi, phi_n} = 2'b01;
    for (int u = 0; u < 4; u++) begin s[u] = '0; din[u] = '0; end
    #10 {phi, phi_n} = 2'b10;
    #10;
    for (int u = 0; u < 4; u++) prev[u] = dout[u];
    for (int cyc = 0; cyc < NCYC; cyc++) begin
      {phi, phi_n} = 2'b01;
      #2;
      for (int u = 0; u < 4; u++) begin
        din[u] = {$urandom(), $urandom()};
        s[u]   = (cyc < N) ? 6'(cyc) : 6'($urandom_range(N - 1, 0));
        expect_now[u] = rotr(din[u], int'(s[u]));
      end
      #7;
      for (int u = 0; u < 2; u++) begin
        checks++; if (dout[u] !== prev[u]) failures++;
      end
      for (int u = 2; u < 4; u++) begin
        checks++; if (dout[u] !== expect_now[u]) failures++;
      end
      #1 {phi, phi_n} = 2'b10;
      #9;
      for (int u = 0; u < 4; u++) begin
        checks++; if (dout[u] !== expect_now[u]) failures++;
        prev[u] = dout[u];
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
