// Self-checking testbench for the K-th order digit-serial IIR filter.
// Three filters of order 1, 2 and 3 run side by side on the same input
// stream, each with its own coefficients. Every output word and its
// truncated form are compared with a word-level model
//   y_k = (sum a_l*x_{k-l} + sum b_l*(y_{k-l} >> N*M)) mod 2^(2*N*M),
// with x and y zero before the first sample. The order-1 filter is also run
// on the worked example a0 = b1 = 45123, a1 = 0, x_0 = 57000 (then zeros),
// whose outputs are 0x994DC5F8, 0x698D0F27, 0x48AC8FE7. Random and all-ones
// coefficients follow. Inputs carry random digits in the half of each frame
// that the filter must ignore, and y_first is checked against its 2-cycle
// latency.
module tb_ds_iirk;
  localparam int unsigned N  = 4;
  localparam int unsigned M  = 4;
  localparam int unsigned W  = N*M;
  localparam int unsigned NK = 3;      // orders 1..NK
  localparam int unsigned NS = 64;     // max samples per run
  logic clk = 0, ce = 1, clr = 1;
  logic [N-1:0] x;
  logic [W-1:0] xs [NS];
  int ocnt;
  bit worked;                          // first run: worked example on K=1

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  // digit counter since clear, seen at the negedge
  always @(negedge clk) begin
    if (clr) ocnt <= 0;
    else     ocnt <= ocnt + 1;
  end

  for (genvar g = 0; g < NK; g++) begin : g_f
    localparam int unsigned K = g + 1;
    logic [K:0][W-1:0] a;
    logic [K:1][W-1:0] b;
    logic [N-1:0] y, yt;
    logic x_first, y_first;
    logic [2*W-1:0] ys [NS], yts [NS];
    int checks = 0, failures = 0;

    ds_iirk #(.N(N), .M(M), .K(K)) dut (.clk, .ce, .clr, .a, .b, .x,
                                       .y, .yt, .x_first, .y_first);

    always @(negedge clk) begin
      if (!clr) begin
        checks++;
        if (x_first !== (ocnt % (2*M) == 0)) begin
          failures++; $display("K=%0d: x_first wrong at %0d", K, ocnt);
        end
        if (ocnt >= 2) begin
          int idx, k, j;
          idx = ocnt - 2; k = idx / (2*M); j = idx % (2*M);
          if (k < NS) begin
            ys[k][j*N +: N]  = y;
            yts[k][j*N +: N] = yt;
          end
          checks++;
          if (y_first !== (j == 0)) begin
            failures++; $display("K=%0d: y_first wrong at k=%0d j=%0d", K, k, j);
          end
        end
      end
    end

    task automatic set_coef(input int mode);
      for (int l = 0; l <= K; l++) a[l] = (mode == 0) ? W'($urandom) : '1;
      for (int l = 1; l <= K; l++) b[l] = (mode == 0) ? W'($urandom) : '1;
    endtask

    task automatic check(input int ns);
      logic [2*W-1:0] e;
      logic [2*W-1:0] yv [NS];
      for (int k = 0; k < ns; k++) begin
        e = '0;
        for (int l = 0; l <= K; l++)
          if (k >= l) e += (2*W)'(a[l]) * (2*W)'(xs[k-l]);
        for (int l = 1; l <= K; l++)
          if (k >= l) e += (2*W)'(b[l]) * (2*W)'(yv[k-l][2*W-1:W]);
        yv[k] = e;
        checks++;
        if (ys[k] !== e) begin
          failures++; $display("K=%0d sample %0d: y=%h expected %h", K, k, ys[k], e);
        end
        checks++;
        if (yts[k] !== {e[2*W-1:W], W'(0)}) begin
          failures++; $display("K=%0d sample %0d: yt=%h", K, k, yts[k]);
        end
      end
      if (K == 1 && worked) begin
        checks++;
        if (ys[0] !== 32'h994DC5F8 || ys[1] !== 32'h698D0F27 || ys[2] !== 32'h48AC8FE7) begin
          failures++; $display("worked example mismatch");
        end
      end
    endtask
  end

  // drive ns samples (plus one frame to flush the last output)
  task automatic run(input int ns);
    clr = 1; x = '0;
    @(negedge clk); @(negedge clk); clr = 0;
    for (int k = 0; k < ns + 1; k++)
      for (int i = 0; i < 2*M; i++) begin
        x = (k < ns && i < M) ? xs[k][i*N +: N] : N'($urandom);
        @(negedge clk);
      end
  endtask

  task automatic check_all(input int ns);
    g_f[0].check(ns); g_f[1].check(ns); g_f[2].check(ns);
  endtask

  initial begin
    int checks, failures;
    // worked example on the first-order filter (others random)
    worked = 1;
    g_f[1].set_coef(0); g_f[2].set_coef(0);
    g_f[0].a[0] = 16'd45123; g_f[0].a[1] = '0; g_f[0].b[1] = 16'd45123;
    xs[0] = 16'd57000; for (int k = 1; k < NS; k++) xs[k] = '0;
    run(3); check_all(3);
    worked = 0;
    // random coefficients and inputs
    for (int rep = 0; rep < 6; rep++) begin
      g_f[0].set_coef(0); g_f[1].set_coef(0); g_f[2].set_coef(0);
      for (int k = 0; k < 24; k++) xs[k] = W'($urandom);
      run(24); check_all(24);
    end
    // impulse response with random coefficients (long recursion)
    g_f[0].set_coef(0); g_f[1].set_coef(0); g_f[2].set_coef(0);
    xs[0] = W'($urandom); for (int k = 1; k < NS; k++) xs[k] = '0;
    run(30); check_all(30);
    // all ones: largest sums and longest carry chains
    g_f[0].set_coef(1); g_f[1].set_coef(1); g_f[2].set_coef(1);
    for (int k = 0; k < 12; k++) xs[k] = '1;
    run(12); check_all(12);
    checks   = g_f[0].checks + g_f[1].checks + g_f[2].checks;
    failures = g_f[0].failures + g_f[1].failures + g_f[2].failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
