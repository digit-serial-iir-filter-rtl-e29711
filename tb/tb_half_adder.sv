// Exhaustive testbench for the NAND half adder: all four input pairs are
// compared with the truth table (s = a xor b, c = a and b).
module tb_half_adder;
  logic a, b, s, c;
  int checks = 0, failures = 0;
  half_adder dut (.*);
  initial begin : watchdog
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 4; v++) begin
      {a, b} = 2'(v); #1;
      checks++;
      if ({c, s} !== 2'(a + b)) begin failures++; $display("a=%b b=%b -> c=%b s=%b", a, b, c, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
