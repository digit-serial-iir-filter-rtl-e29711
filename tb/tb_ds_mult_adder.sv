// Testbench for the 16x16 bit digit-serial multiplier with digit-serial
// adder. Runs the example 45123 * 57000 = 0x994DC5F8 and 200 random products
// back to back (M digits then M zeros each), collecting the 2M output digits
// one cycle after their input digits and comparing with b*y. The product of
// one word takes 2M = 8 cycles.
module tb_ds_mult_adder;
  localparam int unsigned N = 4, M = 4, W = N*M;
  logic clk = 0, ce = 1, clr = 1;
  logic [W-1:0] b;
  logic [N-1:0] y, o;
  int checks = 0, failures = 0;
  ds_mult_adder #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [W-1:0] yw;
    logic [2*W-1:0] p;
    y = 0; b = 0;
    #12 clr = 0;
    for (int r = 0; r < 202; r++) begin
      b  = (r == 0) ? 16'd45123 : (r == 1) ? '1 : W'($urandom);
      yw = (r == 0) ? 16'd57000 : (r == 1) ? '1 : W'($urandom);
      p = 0;
      for (int t = 0; t < 2*M; t++) begin
        @(negedge clk);
        y = (t < M) ? yw[t*N +: N] : '0;
        @(posedge clk); #1;
        p[t*N +: N] = o;
      end
      checks++;
      if (p !== 32'(b) * 32'(yw)) begin failures++; $display("%h*%h: got %h", b, yw, p); end
      if (r == 0) begin
        checks++; if (p !== 32'h994DC5F8) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
