// Testbench for the serial-in/parallel-out register: random digits are
// shifted in; after each clock o must hold the last 2M digits, the newest in
// the most significant position. ce low must hold the contents.
module tb_sipo;
  localparam int unsigned N = 4, M = 4;
  logic clk = 0, ce = 1, clr = 1;
  logic [N-1:0] d;
  logic [2*N*M-1:0] o, m;
  int checks = 0, failures = 0;
  sipo #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    d = 0; m = 0;
    #12 clr = 0;
    for (int i = 0; i < 100; i++) begin
      @(negedge clk);
      d = N'($urandom); ce = ($urandom % 4) != 0;
      @(posedge clk); #1;
      if (ce) m = {d, m[2*N*M-1:N]};
      checks++;
      if (o !== m) begin failures++; $display("i=%0d o=%h expected %h", i, o, m); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
