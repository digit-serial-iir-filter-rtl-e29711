// Testbench for the digit-serial adder of the multiplier. Checks the
// one-cycle latency of the output register with a single digit, then runs
// twenty bursts of 40 random digit quadruples, each followed by zeros: the
// output digits, taken one cycle after their inputs, must spell the number
// sum_t (lsd + s1 + s2 + s3)(t) * 16^t.
module tb_ds_adder;
  localparam int unsigned N = 4;
  logic clk = 0, ce = 1, clr = 1;
  logic [N-1:0] lsd, s1, s2, s3, o;
  int checks = 0, failures = 0;
  ds_adder #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [255:0] vin, vout;
    lsd = 0; s1 = 0; s2 = 0; s3 = 0;
    #12 clr = 0;
    // latency: a single digit 5 appears after exactly one edge
    @(negedge clk); lsd = 4'd5;
    @(posedge clk); #1; lsd = 0;
    checks++; if (o !== 4'd5) begin failures++; $display("latency: o=%h", o); end
    @(posedge clk); #1;
    checks++; if (o !== 4'd0) failures++;
    for (int burst = 0; burst < 20; burst++) begin
      vin = 0; vout = 0;
      for (int t = 0; t < 48; t++) begin
        @(negedge clk);
        if (t < 40) begin lsd = N'($urandom); s1 = N'($urandom); s2 = N'($urandom); s3 = N'($urandom); end
        else begin lsd = 0; s1 = 0; s2 = 0; s3 = 0; end
        vin += (256'(lsd) + 256'(s1) + 256'(s2) + 256'(s3)) << (N*t);
        @(posedge clk); #1;
        vout |= 256'(o) << (N*t);
      end
      checks++;
      if (vin != vout) begin failures++; $display("burst %0d: sum %h vs %h", burst, vin, vout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
