// Testbench for the CSA array, in its combinational form (PIPE = 0) and its
// pipelined form (PIPE = 1) side by side on the same inputs. Words of 2M
// digits are applied back to back with first high on digit 0 of each word;
// each of the six inputs gets a random digit every cycle (all ones in the
// first word). Per word, sum_i (s + c)(i) * 16^i must equal the sum of the
// six inputs' words modulo 16^(2M): carries out of a word are dropped at the
// next first. The pipelined array's digits are taken 2 cycles later.
module tb_csa_array;
  localparam int unsigned N = 4, M = 4, L = 2*M, NW = 100;
  localparam int unsigned T = NW * L;
  logic clk = 0, ce = 1, clr = 1, first;
  logic [N-1:0] ns, nc, rs, rc, fs, fc, s, c, sp, cp;
  int checks = 0, failures = 0;
  csa_array #(.N(N))              dut   (.*);
  csa_array #(.N(N), .PIPE(1'b1)) dut_p (.clk, .ce, .clr, .first, .ns, .nc,
                                         .rs, .rc, .fs, .fc, .s(sp), .c(cp));
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  // per-cycle digit sums of the inputs and of both arrays' outputs
  logic [7:0] din [T+2], d0 [T+2], d1 [T+2];
  initial begin
    logic [63:0] vin, v0, v1;
    first = 0; {ns, nc, rs, rc, fs, fc} = '0;
    #12 clr = 0;
    for (int t = 0; t < T + 2; t++) begin
      @(negedge clk);
      first = (t % L == 0) && (t < T);
      if (t >= T)     {ns, nc, rs, rc, fs, fc} = '0;
      else if (t < L) {ns, nc, rs, rc, fs, fc} = '1;
      else            {ns, nc, rs, rc, fs, fc} = 24'($urandom);
      #1;
      din[t] = 8'(ns) + 8'(nc) + 8'(rs) + 8'(rc) + 8'(fs) + 8'(fc);
      d0[t]  = 8'(s) + 8'(c);
      d1[t]  = 8'(sp) + 8'(cp);
    end
    for (int w = 0; w < NW; w++) begin
      vin = 0; v0 = 0; v1 = 0;
      for (int i = 0; i < L; i++) begin
        vin += 64'(din[w*L + i])    << (N*i);
        v0  += 64'(d0[w*L + i])     << (N*i);
        v1  += 64'(d1[w*L + i + 2]) << (N*i);
      end
      checks += 2;
      if (vin[N*L-1:0] != v0[N*L-1:0]) begin failures++; $display("w=%0d %h vs %h", w, vin, v0); end
      if (vin[N*L-1:0] != v1[N*L-1:0]) begin failures++; $display("pipelined w=%0d %h vs %h", w, vin, v1); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
