// End-to-end testbench of the top level at its default size (N = 4-bit
// digits, M = 4 digits, 16-bit words, 32-bit products and outputs).
//
// Each run clears the design and then, on the shared clock:
//  - feeds the filter a sequence of input words digit-serially and checks
//    every output word y_k and truncated word against the word-level model
//    y_k = (a0 x_k + a1 x_{k-1} + b1 (y_{k-1} >> 16)) mod 2^32;
//  - feeds the same input words to the second-order filter and checks it
//    against y_k = (a0 x_k + a1 x_{k-1} + a2 x_{k-2} + b1 yhat_{k-1}
//    + b2 yhat_{k-2}) mod 2^32, yhat = y >> 16;
//  - checks the multiplier with shift registers (m_o = m_b * m_yy);
//  - checks every digit of the FPGA multiplier (45123 * p_yy).
// Run 0 is the worked example (a0 = b1 = 45123, a1 = 0, x_0 = 57000, then
// zeros: y = 0x994DC5F8, 0x698D0F27, 0x48AC8FE7), on both filters. Later runs use random and
// extreme coefficients, drive garbage on x during the zero half of each
// sample, and pull ce low on random cycles.
//
// Mechanisms counted (each must occur): clock-enable stall, recursion through
// the truncated feedback, truncation of nonzero low digits, use of the
// delayed a1 path, word overflow dropped at the word boundary, carry carried
// forward across an all-ones digit in the pipelined adder, input forced to
// zero in the second half of a sample, clear between runs, and a nonzero
// contribution of the second-order taps (a2 and b2).
module tb_iir_top;
  localparam int unsigned N = 4, M = 4, W = N*M, L = 2*M;
  logic clk = 0, ce = 1, clr = 1;
  logic [W-1:0]   f_a0, f_a1, f_b1, m_b, m_yy, p_yy;
  logic [N-1:0]   f_x, f_y, f_yt, p_o;
  logic           f_x_first, f_y_first;
  logic [2*W-1:0] m_o;
  logic [2:0][W-1:0] k_a;
  logic [2:1][W-1:0] k_b;
  logic [N-1:0]   k_x, k_y, k_yt;
  logic           k_x_first, k_y_first;
  int checks = 0, failures = 0;
  int n_stall = 0, n_recur = 0, n_trunc = 0, n_a1 = 0, n_ovf = 0, n_chain = 0, n_xzero = 0, n_clr = 0, n_ord2 = 0;

  iir_top dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // carry forwarded across an all-ones digit in the pipelined adder
  always @(posedge clk)
    if (!clr && ce && dut.u_iir.u_add.all1 && dut.u_iir.u_add.k) n_chain++;

  logic [W-1:0]   xs [40];
  logic [2*W-1:0] ys [41], yts [41], ks [41], kts [41];
  assign k_x = f_x;

  task automatic run(input int ns, input int stall_pct, input bit garbage);
    int e;          // enabled edges since clear
    logic [2*W-1:0] pf;
    @(negedge clk); clr = 1; n_clr++;
    @(negedge clk); clr = 0;
    e = 0;
    while (e < L * (ns + 1)) begin
      int n;
      ce = ($urandom % 100) >= stall_pct;
      if (!ce) n_stall++;
      n = e;        // input digit index applied before the next enabled edge
      if (n % L == 0) begin
        checks++;
        if (!f_x_first || !k_x_first) begin failures++; $display("x_first missing at %0d", n); end
      end
      if ((n % L) < M) f_x = (n / L < ns) ? xs[n / L][(n % L)*N +: N] : '0;
      else begin
        f_x = garbage ? N'($urandom) : '0;
        if (f_x != 0) n_xzero++;
      end
      @(posedge clk);
      if (ce) e++;
      @(negedge clk);
      if (ce) begin
        // after enabled edge e: filter output index e-2, FPGA digit (e-1)
        if (e >= 2) begin
          int k, j;
          k = (e - 2) / L; j = (e - 2) % L;
          if (k <= ns) begin
            ys[k][j*N +: N] = f_y; yts[k][j*N +: N] = f_yt;
            ks[k][j*N +: N] = k_y; kts[k][j*N +: N] = k_yt;
          end
          checks++;
          if (f_y_first !== (j == 0) || k_y_first !== (j == 0)) begin
            failures++; $display("y_first wrong");
          end
        end
        pf = 32'd45123 * 32'(p_yy);
        checks++;
        if (p_o !== pf[((e - 1) % L)*N +: N]) begin
          failures++; $display("FPGA multiplier digit %0d: %h", (e - 1) % L, p_o);
        end
        if (e >= L + 1 && e % L == 1) begin
          checks++;
          if (m_o !== 32'(m_b) * 32'(m_yy)) begin failures++; $display("m_o=%h", m_o); end
        end
      end
    end
    ce = 1;
    // word-level check of the filter
    begin
      logic [2*W-1:0] ex, yh;
      logic [2*W:0]   full;
      logic [W-1:0]   xp;
      yh = '0; xp = '0;
      for (int k = 0; k < ns; k++) begin
        full = ((2*W+1)'(f_a0) * (2*W+1)'(xs[k])) + ((2*W+1)'(f_a1) * (2*W+1)'(xp))
             + ((2*W+1)'(f_b1) * (2*W+1)'(yh[2*W-1:W]));
        ex = full[2*W-1:0];
        if (full[2*W] || (full >> (2*W)) != 0) n_ovf++;
        if (f_b1 != 0 && yh[2*W-1:W] != 0) n_recur++;
        if (f_a1 != 0 && xp != 0) n_a1++;
        if (ex[W-1:0] != 0) n_trunc++;
        checks += 2;
        if (ys[k] !== ex) begin failures++; $display("sample %0d: y=%h expected %h", k, ys[k], ex); end
        if (yts[k] !== {ex[2*W-1:W], W'(0)}) begin failures++; $display("sample %0d: yt=%h", k, yts[k]); end
        yh = ex; xp = xs[k];
      end
    end
    // word-level check of the second-order filter
    begin
      logic [2*W-1:0] ex, yv [41];
      for (int k = 0; k < ns; k++) begin
        ex = '0;
        for (int l = 0; l <= 2; l++)
          if (k >= l) ex += (2*W)'(k_a[l]) * (2*W)'(xs[k-l]);
        for (int l = 1; l <= 2; l++)
          if (k >= l) ex += (2*W)'(k_b[l]) * (2*W)'(yv[k-l][2*W-1:W]);
        if (k >= 2 && ((k_a[2] != 0 && xs[k-2] != 0) || (k_b[2] != 0 && yv[k-2][2*W-1:W] != 0)))
          n_ord2++;
        yv[k] = ex;
        checks += 2;
        if (ks[k] !== ex) begin failures++; $display("order 2, sample %0d: y=%h expected %h", k, ks[k], ex); end
        if (kts[k] !== {ex[2*W-1:W], W'(0)}) begin failures++; $display("order 2, sample %0d: yt=%h", k, kts[k]); end
      end
    end
  endtask

  initial begin
    f_x = '0;
    // run 0: worked example
    f_a0 = 16'd45123; f_b1 = 16'd45123; f_a1 = '0;
    k_a = '0; k_a[0] = 16'd45123; k_b = '0; k_b[1] = 16'd45123;
    m_b = 16'd45123; m_yy = 16'd57000; p_yy = 16'd57000;
    xs[0] = 16'd57000; for (int k = 1; k < 40; k++) xs[k] = '0;
    run(3, 0, 0);
    checks++;
    if (ys[0] !== 32'h994DC5F8 || ys[1] !== 32'h698D0F27 || ys[2] !== 32'h48AC8FE7 ||
        ks[0] !== 32'h994DC5F8 || ks[1] !== 32'h698D0F27 || ks[2] !== 32'h48AC8FE7) begin
      failures++; $display("worked example mismatch");
    end
    // random runs with stalls and garbage in the zero half
    for (int r = 0; r < 6; r++) begin
      f_a0 = W'($urandom); f_a1 = W'($urandom); f_b1 = W'($urandom);
      for (int l = 0; l <= 2; l++) k_a[l] = W'($urandom);
      k_b[1] = W'($urandom); k_b[2] = W'($urandom);
      m_b = W'($urandom); m_yy = W'($urandom); p_yy = W'($urandom);
      for (int k = 0; k < 40; k++) xs[k] = W'($urandom);
      run(30, 20, 1);
    end
    // extreme values
    f_a0 = '1; f_a1 = '1; f_b1 = '1; k_a = '1; k_b = '1; m_b = '1; m_yy = '1; p_yy = '1;
    for (int k = 0; k < 40; k++) xs[k] = '1;
    run(12, 10, 1);

    $display("mechanisms: stall=%0d recursion=%0d truncation=%0d a1_path=%0d overflow=%0d carry_chain=%0d x_forced_zero=%0d clear=%0d order2_taps=%0d",
             n_stall, n_recur, n_trunc, n_a1, n_ovf, n_chain, n_xzero, n_clr, n_ord2);
    checks++; if (n_stall == 0) begin failures++; $display("no stall"); end
    checks++; if (n_recur == 0) begin failures++; $display("no recursion"); end
    checks++; if (n_trunc == 0) begin failures++; $display("no truncation"); end
    checks++; if (n_a1 == 0) begin failures++; $display("no a1 path"); end
    checks++; if (n_ovf == 0) begin failures++; $display("no overflow"); end
    checks++; if (n_chain == 0) begin failures++; $display("no carry chain"); end
    checks++; if (n_xzero == 0) begin failures++; $display("no forced zero"); end
    checks++; if (n_ord2 == 0) begin failures++; $display("no second-order tap used"); end
    checks++; if (n_clr < 2) begin failures++; $display("no clear"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
