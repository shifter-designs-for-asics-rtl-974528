// Testbench for barrel_field_tg: complementary control pairs must rotate the
// data right by the selected amount; a switch closed only through its pMOS
// line (sel low, sel_n low) must also conduct; with every gate open the
// outputs hold.
module tb_barrel_field_tg;
  localparam int unsigned N = 32;
  logic [N-1:0] din, dout, sel, sel_n, last;
  int checks = 0, failures = 0;

  barrel_field_tg #(.N(N)) dut (.in_bits(din), .sel(sel), .sel_n(sel_n), .out_bits(dout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] dbl;
    for (int rep = 0; rep < 6; rep++) begin
      for (int k = 0; k < N; k++) begin
        din = $urandom();
        sel = '0;
        sel[k] = 1'b1;
        sel_n = ~sel;
        #1;
        dbl = {din, din} >> k;
        checks++; if (dout !== dbl[N-1:0]) failures++;
        // All gates open: hold.
        last = dout;
        sel = '0;
        sel_n = '1;
        #1;
        din = ~din;
        #1;
        checks++; if (dout !== last) failures++;
        // Only the pMOS side of diagonal k on.
        sel_n[k] = 1'b0;
        #1;
        dbl = {din, din} >> k;
        checks++; if (dout !== dbl[N-1:0]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
