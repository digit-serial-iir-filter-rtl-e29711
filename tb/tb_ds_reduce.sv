// Testbench for the two-CSA reducer. Twenty bursts (all ones, then random)
// of 50 digit quadruples, each followed by zeros; per burst the weighted sum
// of s + c over time must equal the weighted sum of the inputs (value
// conservation with the delayed top carries).
module tb_ds_reduce;
  localparam int unsigned N = 4;
  logic clk = 0, ce = 1, clr = 1;
  logic [N-1:0] d0, d1, d2, d3, s, c;
  int checks = 0, failures = 0;
  ds_reduce #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    logic [511:0] vin, vout;
    d0 = 0; d1 = 0; d2 = 0; d3 = 0;
    #12 clr = 0;
    for (int burst = 0; burst < 20; burst++) begin
      vin = 0; vout = 0;
      for (int t = 0; t < 56; t++) begin
        @(negedge clk);
        if (t < 50) begin
          if (burst == 0) begin d0 = '1; d1 = '1; d2 = '1; d3 = '1; end
          else begin d0 = N'($urandom); d1 = N'($urandom); d2 = N'($urandom); d3 = N'($urandom); end
        end else begin d0 = 0; d1 = 0; d2 = 0; d3 = 0; end
        #1;
        vin  += (512'(d0) + 512'(d1) + 512'(d2) + 512'(d3)) << (N*t);
        vout += (512'(s) + 512'(c)) << (N*t);
      end
      checks++;
      if (vin != vout) begin failures++; $display("burst %0d: value not conserved", burst); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
