// Testbench for the bit-level pipelined digit-serial adder. Words of 2M
// digit pairs (s, c) are applied back to back with first on digit 0, ci
// random, and cnt = 0 for the M low digits and 1 for the M high ones (the
// truncation pattern). The output digits, two cycles after their inputs,
// must spell (S + C + ci) mod 16^(2M); t must be the same with its M low
// digits zero. Words built to make long carry chains through all-ones
// digits are included.
module tb_bl_ds_adder;
  localparam int unsigned N = 4, M = 4, L = 2*M, W = N*L;
  logic clk = 0, ce = 1, clr = 1, first, ci, cnt;
  logic [N-1:0] s, c, o, t;
  int checks = 0, failures = 0, chains = 0;
  bl_ds_adder #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin : watchdog
    #1000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  logic [W-1:0] sw [200], cw [200], ow [200], tw [200];
  logic         ciw [200];
  int nin = 0;
  // capture: the output of input cycle n is on o two edges later
  int nout = -1;
  always @(posedge clk) begin
    #1;
    if (!clr && nout >= 0 && nout < 200 * L) begin
      ow[nout / L][(nout % L)*N +: N] = o;
      tw[nout / L][(nout % L)*N +: N] = t;
    end
    if (!clr) nout++;
  end
  initial begin
    first = 0; ci = 0; cnt = 0; s = 0; c = 0;
    for (int w = 0; w < 200; w++) begin
      case (w % 4)
        0: begin sw[w] = W'({$urandom, $urandom}); cw[w] = W'({$urandom, $urandom}); end
        1: begin sw[w] = W'({$urandom, $urandom}); cw[w] = ~sw[w]; end      // all ones sum
        2: begin sw[w] = '1; cw[w] = 1; end
        default: begin sw[w] = W'({$urandom, $urandom}); cw[w] = W'(-sw[w]); end
      endcase
      ciw[w] = 1'($urandom);
    end
    #12;
    @(negedge clk); clr = 0;
    for (int w = 0; w < 200; w++)
      for (int i = 0; i < L; i++) begin
        first = (i == 0); ci = ciw[w]; cnt = (i >= M);
        s = sw[w][i*N +: N]; c = cw[w][i*N +: N];
        @(negedge clk);
      end
    s = 0; c = 0; first = 1;
    repeat (3) @(negedge clk);
    for (int w = 0; w < 200; w++) begin
      logic [W-1:0] e;
      e = sw[w] + cw[w] + W'(ciw[w]);
      checks++;
      if (ow[w] !== e) begin failures++; $display("w=%0d %h+%h+%b: %h", w, sw[w], cw[w], ciw[w], ow[w]); end
      checks++;
      if (tw[w] !== {e[W-1:N*M], (N*M)'(0)}) begin failures++; $display("w=%0d t=%h", w, tw[w]); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
