// Testbench for barrel_decoder: both variants (with and without complement
// lines). Precharge: sel = 0 and sel_n = all ones. Evaluation: sel one-hot at
// s_code, sel_n its complement (all ones without complement lines).
module tb_barrel_decoder;
  localparam int unsigned N = 32;
  logic         phi, phi_n;
  logic [4:0]   code;
  logic [N-1:0] sel_c, seln_c, sel_p, seln_p;
  int checks = 0, failures = 0;

  barrel_decoder #(.N(N), .COMPLEMENT(1'b1)) dut_tg (
    .phi(phi), .phi_n(phi_n), .s_code(code), .sel(sel_c), .sel_n(seln_c));
  barrel_decoder #(.N(N), .COMPLEMENT(1'b0)) dut_pt (
    .phi(phi), .phi_n(phi_n), .s_code(code), .sel(sel_p), .sel_n(seln_p));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] onehot;
    for (int rep = 0; rep < 2; rep++) begin
      for (int s = 0; s < N; s++) begin
        code = 5'(s);
        onehot = '0;
        onehot[s] = 1'b1;
        {phi, phi_n} = 2'b01;   // precharge
        #5;
        checks++; if (sel_c  !== '0) failures++;
        checks++; if (seln_c !== '1) failures++;
        checks++; if (sel_p  !== '0) failures++;
        checks++; if (seln_p !== '1) failures++;
        {phi, phi_n} = 2'b10;   // evaluate
        #5;
        checks++; if (sel_c  !== onehot)  failures++;
        checks++; if (seln_c !== ~onehot) failures++;
        checks++; if (sel_p  !== onehot)  failures++;
        checks++; if (seln_p !== '1)      failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
