// Exhaustive testbench for the 4-bit carry save adder: for all 4096 input
// triples, s + 2*co must equal a + b + c, and each bit position must be an
// independent full adder.
module tb_csa;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, c, s, co;
  int checks = 0, failures = 0;
  csa #(.N(N)) dut (.*);
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4096; v++) begin
      {a, b, c} = 12'(v); #1;
      checks++;
      if (32'(s) + 2*32'(co) != 32'(a) + 32'(b) + 32'(c)) begin
        failures++; $display("%h %h %h -> s=%h co=%h", a, b, c, s, co);
      end
      for (int k = 0; k < N; k++) begin
        checks++;
        if ({co[k], s[k]} !== 2'(a[k] + b[k] + c[k])) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
