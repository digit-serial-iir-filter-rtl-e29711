// Testbench for the multiplier with input and output shift registers.
// For the example 45123 * 57000 and 50 random pairs: clear, then after
// exactly 2M+1 clock edges o must hold b*yy (and not after 2M), and it must
// stay there for further words.
module tb_ds_mult_sr;
  localparam int unsigned N = 4, M = 4, W = N*M;
  logic clk = 0, ce = 1, clr = 1;
  logic [W-1:0] b, yy;
  logic [2*W-1:0] o;
  int checks = 0, failures = 0;
  ds_mult_sr #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int r = 0; r < 51; r++) begin
      @(negedge clk); clr = 1;
      b  = (r == 0) ? 16'd45123 : W'($urandom);
      yy = (r == 0) ? 16'd57000 : W'($urandom | 1);
      @(negedge clk); clr = 0;
      repeat (2*M) @(posedge clk);
      #1 checks++;
      if (o === 32'(b) * 32'(yy) && b != 0) begin failures++; $display("result too early"); end
      @(posedge clk); #1;
      checks++;
      if (o !== 32'(b) * 32'(yy)) begin failures++; $display("%h*%h: o=%h", b, yy, o); end
      if (r == 0) begin checks++; if (o !== 32'h994DC5F8) failures++; end
      repeat (2*M) @(posedge clk);
      #1 checks++;
      if (o !== 32'(b) * 32'(yy)) begin failures++; $display("result not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
