// Testbench for the parallel-in/serial-out register: after clear, y must
// show digits 0..M-1 of yy and then M zero digits, repeating every 2M enabled
// clocks; with ce low the digit must hold.
module tb_piso;
  localparam int unsigned N = 4, M = 4;
  logic clk = 0, ce = 1, clr = 1;
  logic [N*M-1:0] yy;
  logic [N-1:0] y;
  logic [$clog2(2*M)-1:0] cnt;
  int checks = 0, failures = 0;
  piso #(.N(N), .M(M)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int pos;
    yy = 16'hDEA8;
    @(negedge clk); clr = 0;
    pos = 0;
    for (int i = 0; i < 100; i++) begin
      if (i == 20) yy = 16'($urandom);
      #1 checks++;
      if (y !== ((pos < M) ? yy[pos*N +: N] : '0)) begin failures++; $display("i=%0d pos=%0d y=%h", i, pos, y); end
      ce = ($urandom % 4) != 0;
      if (ce) pos = (pos + 1) % (2*M);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
