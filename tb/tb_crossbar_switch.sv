// Testbench for crossbar_switch: random permutations (one closed switch per
// output row) must route out[j] = in[perm[j]]; with every switch open the
// outputs must keep their last value while the inputs change; a row left
// open while the others are switched must keep its value.
module tb_crossbar_switch;
  localparam int unsigned N = 32;
  logic [N-1:0]        din, dout, last;
  logic [N-1:0][N-1:0] conn;
  int perm [N];
  int checks = 0, failures = 0;

  crossbar_switch #(.N(N)) dut (.in_bits(din), .conn(conn), .out_bits(dout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic shuffle();
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int r, tmp;
      r = $urandom_range(i, 0);
      tmp = perm[i]; perm[i] = perm[r]; perm[r] = tmp;
    end
  endtask

  initial begin
    for (int t = 0; t < 100; t++) begin
      shuffle();
      conn = '0;
      for (int j = 0; j < N; j++) conn[j][perm[j]] = 1'b1;
      din = $urandom();
      #1;
      checks++;
      for (int j = 0; j < N; j++) if (dout[j] !== din[perm[j]]) begin failures++; break; end
      // Open every switch, change the inputs: outputs hold.
      last = dout;
      conn = '0;
      #1;
      din = ~din;
      #1;
      checks++; if (dout !== last) failures++;
      // Row 5 open, the rest switched straight through.
      for (int j = 0; j < N; j++) conn[j][j] = (j != 5);
      din = $urandom();
      #1;
      checks++; if (dout[5] !== last[5]) failures++;
      checks++; if ((dout & ~(32'd1 << 5)) !== (din & ~(32'd1 << 5))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
