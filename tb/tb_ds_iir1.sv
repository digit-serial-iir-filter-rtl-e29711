// Self-checking testbench for the first-order digit-serial IIR filter, in
// its default form and with the sub-digit pipelined CSA array (PIPE = 1),
// side by side on the same input stream. Drives a sequence of input words
// (digit-serially, M digits then M don't-care cycles), collects the 2M output
// digits of every sample and compares each output word, and its truncated
// form, with a word-level model
//   y_k = (a0*x_k + a1*x_{k-1} + b1*(y_{k-1} >> N*M)) mod 2^(2*N*M).
// Case 1 reproduces the worked example with a0 = b1 = 45123, a1 = 0, x_0 = 57000
// and zero input afterwards (y = 0x994DC5F8, 0x698D0F27, 0x48AC8FE7).
// Case 2 uses random coefficients and inputs (sums overflow 2^(2NM)).
// Case 3 uses all-ones coefficients and inputs.
// It also checks x_first against the frame and y_first against the latency
// from x to y: 2 cycles, or 4 with the pipelined array.
module tb_ds_iir1;
  localparam int unsigned N  = 4;
  localparam int unsigned M  = 4;
  localparam int unsigned W  = N*M;
  localparam int unsigned NS = 64;
  logic clk = 0, ce = 1, clr = 1;
  logic [W-1:0] a0, a1, b1;
  logic [N-1:0] x;
  logic [W-1:0] xs [NS];
  int ocnt;      // enabled edges since clear, as seen at the negedge

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", 0, 1);
    $finish;
  end

  always @(negedge clk) begin
    if (clr) ocnt <= 0;
    else     ocnt <= ocnt + 1;
  end

  for (genvar g = 0; g < 2; g++) begin : g_f
    localparam bit          PIPE = (g == 1);
    localparam int unsigned LAT  = PIPE ? 4 : 2;
    logic [N-1:0] y, yt;
    logic x_first, y_first;
    logic [2*W-1:0] ys [NS], yts [NS];
    int checks = 0, failures = 0;

    ds_iir1 #(.N(N), .M(M), .PIPE(PIPE)) dut (.clk, .ce, .clr, .a0, .a1, .b1, .x,
                                             .y, .yt, .x_first, .y_first);

    // output digit j of sample k appears LAT cycles after input digit j
    always @(negedge clk) begin
      if (!clr) begin
        checks++;
        if (x_first !== (ocnt % (2*M) == 0)) begin
          failures++; $display("PIPE=%0d: x_first wrong at %0d", PIPE, ocnt);
        end
        if (ocnt >= LAT) begin
          int idx, k, j;
          idx = ocnt - LAT; k = idx / (2*M); j = idx % (2*M);
          if (k < NS) begin
            ys[k][j*N +: N]  = y;
            yts[k][j*N +: N] = yt;
          end
          checks++;
          if (y_first !== (j == 0)) begin
            failures++; $display("PIPE=%0d: y_first wrong at k=%0d j=%0d", PIPE, k, j);
          end
        end
      end
    end

    task automatic check(input int ns, input bit worked);
      logic [2*W-1:0] e, yh;
      logic [W-1:0] xp;
      yh = '0; xp = '0;
      for (int k = 0; k < ns; k++) begin
        e = ((2*W)'(a0) * (2*W)'(xs[k])) + ((2*W)'(a1) * (2*W)'(xp))
          + ((2*W)'(b1) * (2*W)'(yh[2*W-1:W]));
        checks++;
        if (ys[k] !== e) begin
          failures++; $display("PIPE=%0d sample %0d: y=%h expected %h", PIPE, k, ys[k], e);
        end
        checks++;
        if (yts[k] !== {e[2*W-1:W], W'(0)}) begin
          failures++; $display("PIPE=%0d sample %0d: yt=%h", PIPE, k, yts[k]);
        end
        yh = e; xp = xs[k];
      end
      if (worked) begin
        checks++;
        if (ys[0] !== 32'h994DC5F8 || ys[1] !== 32'h698D0F27 || ys[2] !== 32'h48AC8FE7) begin
          failures++; $display("PIPE=%0d: worked example mismatch", PIPE);
        end
      end
    endtask
  end

  // drive ns samples (plus one frame to flush the last output); digits in
  // the second half of each frame are random and must be ignored
  task automatic run(input int ns);
    clr = 1; x = '0;
    @(negedge clk); @(negedge clk); clr = 0;
    for (int k = 0; k < ns + 1; k++)
      for (int i = 0; i < 2*M; i++) begin
        x = (k < ns && i < M) ? xs[k][i*N +: N] : N'($urandom);
        @(negedge clk);
      end
  endtask

  task automatic check_all(input int ns, input bit worked);
    g_f[0].check(ns, worked); g_f[1].check(ns, worked);
  endtask

  initial begin
    int checks, failures;
    // case 1: the worked example
    a0 = 16'd45123; b1 = 16'd45123; a1 = '0;
    xs[0] = 16'd57000; for (int k = 1; k < NS; k++) xs[k] = '0;
    run(3); check_all(3, 1);
    // case 2: random
    for (int rep = 0; rep < 4; rep++) begin
      a0 = W'($urandom); a1 = W'($urandom); b1 = W'($urandom);
      for (int k = 0; k < 20; k++) xs[k] = W'($urandom);
      run(20); check_all(20, 0);
    end
    // case 3: extreme values (maximal overflow)
    a0 = '1; a1 = '1; b1 = '1;
    for (int k = 0; k < 10; k++) xs[k] = '1;
    run(10); check_all(10, 0);
    checks   = g_f[0].checks + g_f[1].checks;
    failures = g_f[0].failures + g_f[1].failures;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
