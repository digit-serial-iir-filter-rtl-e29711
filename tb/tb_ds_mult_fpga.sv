// Testbench for the reduced FPGA multiplier (multiplicand fixed at 45123).
// After clear, output digit t must appear after t+1 clock edges; the 2M
// digits must spell 45123*yy, for the example yy = 57000 (0x994DC5F8) and
// for 50 random words, over two consecutive repetitions.
module tb_ds_mult_fpga;
  localparam int unsigned N = 4, M = 4, W = N*M;
  logic clk = 0, ce = 1, clr = 1;
  logic [W-1:0] yy;
  logic [N-1:0] o;
  int checks = 0, failures = 0;
  ds_mult_fpga #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [2*W-1:0] p;
    for (int r = 0; r < 51; r++) begin
      @(negedge clk); clr = 1;
      yy = (r == 0) ? 16'd57000 : W'($urandom);
      @(negedge clk); clr = 0;
      for (int rep = 0; rep < 2; rep++) begin
        p = 0;
        for (int t = 0; t < 2*M; t++) begin
          @(posedge clk); #1;
          p[t*N +: N] = o;
        end
        checks++;
        if (p !== 32'd45123 * 32'(yy)) begin failures++; $display("yy=%h: got %h", yy, p); end
        if (r == 0) begin checks++; if (p !== 32'h994DC5F8) failures++; end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
