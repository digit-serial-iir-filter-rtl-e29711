// Testbench for the cascade of M multiplier cells (no final adder).
// Products of random 16-bit words (and of all-ones words) are applied back
// to back, 2M cycles each, and the redundant outputs are summed with their
// significance: sum over the 2M cycles of (lsd + s1 + s2 + s3) * 16^t must
// equal b*y exactly, since no term of a product may leave its 2M digits.
module tb_ds_mult;
  localparam int unsigned N = 4, M = 4, W = N*M;
  logic clk = 0, ce = 1, clr = 1;
  logic [W-1:0] b;
  logic [N-1:0] y, lsd, s1, s2, s3;
  int checks = 0, failures = 0;
  ds_mult #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [W-1:0] yw;
    logic [127:0] acc;
    y = 0; b = 0;
    #12 clr = 0;
    for (int r = 0; r < 60; r++) begin
      b  = (r == 0) ? 16'd45123 : (r == 1) ? '1 : W'($urandom);
      yw = (r == 0) ? 16'd57000 : (r == 1) ? '1 : W'($urandom);
      acc = 0;
      for (int t = 0; t < 2*M; t++) begin
        @(negedge clk);
        y = (t < M) ? yw[t*N +: N] : '0;
        #1;
        acc += (128'(lsd) + 128'(s1) + 128'(s2) + 128'(s3)) << (N*t);
      end
      checks++;
      if (acc != 128'(32'(b) * 32'(yw))) begin
        failures++; $display("r=%0d %h*%h: got %h", r, b, yw, acc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
