// Testbench for the 4-bit register with clock enable and asynchronous clear.
// Random d, ce and clr each cycle, plus clr pulses between clock edges; a
// model register gives the expected q (clear wins, ce low holds).
module tb_reg4;
  logic clk = 0, ce, clr;
  logic [3:0] d, q, m;
  int checks = 0, failures = 0;
  reg4 #(.W(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    clr = 1; ce = 0; d = 0; m = 0; #1;
    checks++; if (q !== 4'h0) failures++;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      d = 4'($urandom); ce = 1'($urandom); clr = ($urandom % 8) == 0;
      if (i % 37 == 5) begin        // asynchronous clear between edges
        clr = 0; #1 clr = 1; #1;
        checks++; if (q !== 4'h0) begin failures++; $display("async clear failed"); end
        m = 0; clr = 0;
      end
      @(posedge clk); #1;
      if (clr) m = 0; else if (ce) m = d;
      checks++;
      if (q !== m) begin failures++; $display("i=%0d q=%h expected %h", i, q, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
