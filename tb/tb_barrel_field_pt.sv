// Testbench for barrel_field_pt: for every single control line k and random
// data, out must equal in rotated right by k; with all lines low the outputs
// must hold while the inputs change.
module tb_barrel_field_pt;
  localparam int unsigned N = 32;
  logic [N-1:0] din, dout, sel, last;
  int checks = 0, failures = 0;

  barrel_field_pt #(.N(N)) dut (.in_bits(din), .sel(sel), .out_bits(dout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [2*N-1:0] dbl;
    for (int rep = 0; rep < 8; rep++) begin
      for (int k = 0; k < N; k++) begin
        din = $urandom();
        sel = '0;
        sel[k] = 1'b1;
        #1;
        dbl = {din, din} >> k;
        checks++; if (dout !== dbl[N-1:0]) failures++;
        last = dout;
        sel = '0;
        #1;
        din = ~din;
        #1;
        checks++; if (dout !== last) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
