// Exhaustive testbench for the AND-gated full adder:
// {co, s} must equal (a0 & a1) + b + cin for all 16 input combinations.
module tb_and_gated_fa;
  logic a0, a1, b, cin, s, co;
  int checks = 0, failures = 0;
  and_gated_fa dut (.*);
  initial begin : watchdog
    #10000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 16; v++) begin
      {a0, a1, b, cin} = 4'(v); #1;
      checks++;
      if ({co, s} !== 2'((a0 & a1) + b + cin)) begin failures++; $display("%b%b%b%b -> %b%b", a0, a1, b, cin, co, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
