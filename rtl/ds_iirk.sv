// K-th order digit-serial IIR filter
//
//   y_k  = sum_{l=0..K} a_l*x_{k-l} + sum_{l=1..K} b_l*yhat_{k-l}  (mod 2^(2NM))
//   yhat = y >> (N*M)
//
// This is the first-order filter (ds_iir1) with the pair of multipliers for
// the older input and the fed-back output replicated K times. Words, frame
// and timing are the same as in ds_iir1: M digits of N bits, unsigned, 2M
// cycles per sample, least significant digit first; x is forced to zero in
// the second half of each frame; y carries digit 0 of y_k (y_first high)
// 2 cycles after digit 0 of x_k; yt is y with the M least significant digits
// masked, and it is what the loop feeds back.
//
// How the taps line up: every multiplier must deliver its product digits in
// the same frame as the a0 product of x_k.
//   * a_l (l >= 1) multiplies x delayed by 2lM cycles. One shared delay line
//     on x provides (2l-1)M of them; the last M sit on the product's
//     sum/carry pair, as for the a1 tap of the first-order filter.
//   * b_1 multiplies yhat directly (loop delay: 2 adder stages + M-2
//     registers, see ds_iir1).
//   * b_l (l >= 2) multiplies yhat delayed by a further 2(l-1)M cycles: a
//     shared delay line on yhat provides (2l-3)M, and M sit on the product.
// The 2K+1 sum/carry pairs are reduced by a chain of K CSA arrays, each
// taking the running pair and two more products. The CSA arrays add no
// latency, so the loop timing is that of the first-order filter whatever K.
//
// What follows the source architecture: replication of the a/b multiplier
// pair per order, M of the 2M delays of each older tap moved into the
// partial-product path, CSA accumulation into one pair and a bit-level
// pipelined adder closing the loop. This design's own choices: the split
// of the delays between input and product paths for taps beyond the first,
// the shared delay lines and the order in which the CSA chain takes the
// products. The default order K = 2 is the second-order form in which the
// source first draws the filter.
//
// Ports: a[l] is a_l (l = 0..K), b[l] is b_l (l = 1..K); coefficients are
// parallel words that must be stable. ce stalls every register, clr clears
// every register asynchronously and restarts the frame counter.
module ds_iirk #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4,
  parameter int unsigned K = 2
) (
  input  logic                 clk,
  input  logic                 ce,
  input  logic                 clr,
  input  logic [K:0][N*M-1:0]  a,
  input  logic [K:1][N*M-1:0]  b,
  input  logic [N-1:0]         x,
  output logic [N-1:0]         y,
  output logic [N-1:0]         yt,
  output logic                 x_first,
  output logic                 y_first
);
  localparam int unsigned CW = $clog2(2*M);
  localparam int unsigned NP = 2*K + 1;           // number of products
  localparam int unsigned LX = (2*K - 1) * M;     // x delay line length
  localparam int unsigned LY = (K >= 2) ? (2*K - 3) * M : 0;  // yhat line
  localparam int unsigned FD = M - 2;             // loop delay after the adder

  // ---- frame counter ------------------------------------------------------
  logic [CW-1:0] cnt;
  always_ff @(posedge clk or posedge clr) begin
    if (clr)     cnt <= '0;
    else if (ce) cnt <= (cnt == CW'(2*M-1)) ? '0 : cnt + 1'b1;
  end
  logic first, msd_half;
  assign first    = (cnt == '0);
  assign msd_half = (cnt >= CW'(M));
  assign x_first  = first;

  logic [N-1:0] xin, yhat;
  assign xin = msd_half ? '0 : x;

  // ---- shared delay lines ------------------------------------------------
  logic [LX:0][N-1:0] xd;
  assign xd[0] = xin;
  for (genvar d = 0; d < LX; d++) begin : g_xd
    reg4 #(.W(N)) u_r (.clk, .ce, .clr, .d(xd[d]), .q(xd[d+1]));
  end
  logic [LY:0][N-1:0] yd;
  assign yd[0] = yhat;
  for (genvar d = 0; d < LY; d++) begin : g_yd
    reg4 #(.W(N)) u_r (.clk, .ce, .clr, .d(yd[d]), .q(yd[d+1]));
  end

  // ---- products: index 0 = a0, 2l-1 = a_l, 2l = b_l ---------------------
  logic [NP-1:0][N-1:0] ps, pc;

  for (genvar p = 0; p < NP; p++) begin : g_p
    localparam int unsigned L     = (p + 1) / 2;        // tap order
    localparam bit          IS_B  = (p != 0) && (p % 2 == 0);
    localparam bit          POSTD = (L >= 2) || (L == 1 && !IS_B);
    logic [N*M-1:0] coef;
    logic [N-1:0]   din, l0, q1, q2, q3, rs, rc;
    if (p == 0) begin : g_in
      assign coef = a[0];
      assign din  = xin;
    end else if (!IS_B) begin : g_in
      assign coef = a[L];
      assign din  = xd[(2*L-1)*M];
    end else if (L == 1) begin : g_in
      assign coef = b[1];
      assign din  = yhat;
    end else begin : g_in
      assign coef = b[L];
      assign din  = yd[(2*L-3)*M];
    end
    ds_mult   #(.N(N), .M(M)) u_m (.clk, .ce, .clr, .b(coef), .y(din),
                                   .lsd(l0), .s1(q1), .s2(q2), .s3(q3));
    ds_reduce #(.N(N))        u_r (.clk, .ce, .clr, .d0(l0), .d1(q1), .d2(q2), .d3(q3),
                                   .s(rs), .c(rc));
    if (POSTD) begin : g_post
      logic [M:0][2*N-1:0] pd;
      assign pd[0] = {rs, rc};
      for (genvar d = 0; d < M; d++) begin : g_d
        reg4 #(.W(2*N)) u_r (.clk, .ce, .clr, .d(pd[d]), .q(pd[d+1]));
      end
      assign {ps[p], pc[p]} = pd[M];
    end else begin : g_direct
      assign ps[p] = rs;
      assign pc[p] = rc;
    end
  end

  // ---- CSA chain: K arrays, each adds two products to the running pair ----
  logic [K:0][N-1:0] acs, acc;
  assign acs[0] = ps[0];
  assign acc[0] = pc[0];
  for (genvar i = 0; i < K; i++) begin : g_acc
    csa_array #(.N(N)) u_csa (.clk, .ce, .clr, .first,
                              .ns(acs[i]), .nc(acc[i]),
                              .rs(ps[2*i+2]), .rc(pc[2*i+2]),
                              .fs(ps[2*i+1]), .fc(pc[2*i+1]),
                              .s(acs[i+1]), .c(acc[i+1]));
  end

  bl_ds_adder #(.N(N)) u_add (.clk, .ce, .clr, .first, .ci(1'b0), .cnt(msd_half),
                              .s(acs[K]), .c(acc[K]), .o(y), .t(yt));

  // ---- loop delay ---------------------------------------------------------
  logic [FD:0][N-1:0] fbd;
  assign fbd[0] = yt;
  for (genvar d = 0; d < FD; d++) begin : g_fbd
    reg4 #(.W(N)) u_r (.clk, .ce, .clr, .d(fbd[d]), .q(fbd[d+1]));
  end
  assign yhat = fbd[FD];

  logic [1:0] fq;
  reg4 #(.W(2)) u_fq (.clk, .ce, .clr, .d({fq[0], first}), .q(fq));
  assign y_first = fq[1];

  initial assert (M >= 2 && K >= 1) else $error("ds_iirk needs M >= 2 and K >= 1");
endmodule
