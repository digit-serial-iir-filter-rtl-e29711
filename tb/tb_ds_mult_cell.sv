// Testbench for the digit-serial multiplier cell.
// 1) The single-cell example: b = 11, y = 13, all other inputs 0. The LSD
//    output must be 0xF at once and, one cycle later, s1+s2+s3 must be 8
//    (143 = 0x8F).
// 2) Ten bursts (all ones, then random) of 40 cycles, each followed by 6
//    cycles of zeros. lsd_out must be
//    the low digit of b*y every cycle, and the cell must conserve value:
//    sum over t of (MSD(b*y) + lsd_in + s1_in + s2_in + s3_in) * 16^t equals
//    sum over t of (s1_out + s2_out + s3_out)(t+1) * 16^t.
module tb_ds_mult_cell;
  localparam int unsigned N = 4;
  logic clk = 0, ce = 1, clr = 1;
  logic [N-1:0] b, y, lsd_in, s1_in, s2_in, s3_in, lsd_out, s1_out, s2_out, s3_out;
  int checks = 0, failures = 0;
  ds_mult_cell #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #100000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [255:0] vin, vout;
  initial begin
    b = 4'd11; y = 4'd13; lsd_in = 0; s1_in = 0; s2_in = 0; s3_in = 0;
    #12 clr = 0;
    @(negedge clk);
    checks++; if (lsd_out !== 4'hF) begin failures++; $display("LSD %h", lsd_out); end
    @(posedge clk); #1; y = 0; b = 0;
    checks++;
    if (32'(s1_out) + 32'(s2_out) + 32'(s3_out) != 8) begin
      failures++; $display("MSD %h+%h+%h", s1_out, s2_out, s3_out);
    end
    // random conservation test, ten bursts
    for (int burst = 0; burst < 10; burst++) begin
      @(negedge clk); clr = 1; #1 clr = 0;
      vin = 0; vout = 0;
      for (int t = 0; t < 46; t++) begin
        @(negedge clk);
        if (t < 40) begin
          b = N'($urandom); y = N'($urandom); lsd_in = N'($urandom);
          s1_in = N'($urandom); s2_in = N'($urandom); s3_in = N'($urandom);
          if (burst == 0) begin b = '1; y = '1; lsd_in = '1; s1_in = '1; s2_in = '1; s3_in = '1; end
        end else begin
          b = 0; y = 0; lsd_in = 0; s1_in = 0; s2_in = 0; s3_in = 0;
        end
        #1;
        checks++;
        if (lsd_out !== N'(b * y)) begin failures++; $display("t=%0d lsd %h", t, lsd_out); end
        vin += (256'((8'(b) * 8'(y)) >> N) + 256'(lsd_in) + 256'(s1_in) + 256'(s2_in) + 256'(s3_in)) << (N*t);
        @(posedge clk); #1;
        vout += (256'(s1_out) + 256'(s2_out) + 256'(s3_out)) << (N*t);
      end
      checks++;
      if (vin != vout) begin failures++; $display("burst %0d: value not conserved: %h vs %h", burst, vin, vout); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
