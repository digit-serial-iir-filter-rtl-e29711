// Exhaustive testbench for the 4-bit carry ripple adder:
// {co, s} must equal a + b + cin for all 512 input combinations.
module tb_cra;
  localparam int unsigned N = 4;
  logic [N-1:0] a, b, s;
  logic cin, co;
  int checks = 0, failures = 0;
  cra #(.N(N)) dut (.*);
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int v = 0; v < 512; v++) begin
      {a, b, cin} = 9'(v); #1;
      checks++;
      if ({co, s} !== 5'(a + b + cin)) begin failures++; $display("%h+%h+%b -> %b %h", a, b, cin, co, s); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
