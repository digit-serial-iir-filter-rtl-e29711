// Exhaustive testbench for the full adder: the eight input combinations are
// compared with {co, s} = a + b + cin.
module tb_full_adder;
  logic a, b, cin, s, co;
  int checks = 0, failures = 0;
  full_adder dut (.*);
  initial begin : watchdog
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, cin} = 3'(v); #1;
      checks++;
      if ({co, s} !== 2'(a + b + cin)) begin failures++; $display("%b%b%b -> %b%b", a, b, cin, co, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
