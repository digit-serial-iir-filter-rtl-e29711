// First-order digit-serial IIR filter
//
//   y_k = a0*x_k + a1*x_{k-1} + b1*yhat_{k-1},  yhat = y >> (N*M)
//
// Words are M digits of N bits (16 bits by default), unsigned. Each sample
// takes 2M cycles: the M digits of x_k, least significant first, followed by
// M cycles in which zeros are fed (the input is forced to zero in those
// cycles, so x may carry anything there). The output y_k has 2M digits and
// leaves one digit per cycle, least significant first; it is computed modulo
// 2^(2*N*M). Only the M most significant digits of y_k (yhat_k, which has the
// significance of the input) are fed back, so the word length does not grow.
//
// Structure (cell A, cell B):
//   x -> digit-serial multiplier a0 ---------------------------\
//   x -> M delays -> multiplier a1 -> M delays (sum and carry) -> CSA array
//   yhat -> multiplier b1 -------------------------------------/      |
//   bit-level pipelined digit-serial adder <---------------------------/
//   adder -> y ;  y AND control -> M-2 delays -> yhat
// Each multiplier hands its product on as a sum/carry digit pair (ds_reduce).
// The a1 product of x_{k-1} reaches the CSA array 2M cycles after x_{k-1}
// entered, i.e. together with the a0 product of x_k.
//
// Feedback timing: the truncation control is 0 for the M least significant
// output digits and 1 for the M most significant ones. The truncated stream
// is delayed so that the first MSD of y_k enters the b1 multiplier together
// with the first digit of x_{k+1}; during the second half of the sample the
// delayed stream carries the masked LSDs, i.e. zeros, exactly as the
// multiplier needs. The M cycles between the computation of an MSD and its
// reuse are spent as: 2 cycles in the pipelined adder, M-2 plain delays.
// M must therefore be at least 2.
//
// Sub-digit pipelining (PIPE = 1, off by default): the CSA array is cut into
// three stages by two rows of registers, which takes 2 more of the M loop
// cycles; the plain feedback delay shrinks to M-4 (M >= 4), and y follows x
// by 4 cycles instead of 2. The source architecture proposes this for long
// words (32 digits); its 16-bit build uses the unpipelined array, which is
// why that is the default here.
//
// Interface: x_first is high in the cycle in which digit 0 of an input word
// must be on x (a 2M-cycle counter starts at 0 after clr). y and yt (the
// truncated output) carry digit 0 of y_k when y_first is high, i.e. 2 cycles
// (4 with PIPE) after digit 0 of x_k was applied. Clock enable ce, asynchronous clear clr.
module ds_iir1 #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4,
  parameter bit          PIPE = 1'b0
) (
  input  logic           clk,
  input  logic           ce,
  input  logic           clr,
  input  logic [N*M-1:0] a0,
  input  logic [N*M-1:0] a1,
  input  logic [N*M-1:0] b1,
  input  logic [N-1:0]   x,
  output logic [N-1:0]   y,
  output logic [N-1:0]   yt,
  output logic           x_first,
  output logic           y_first
);
  localparam int unsigned CW  = $clog2(2*M);
  localparam int unsigned LAT = PIPE ? 4 : 2;   // adder (2) + CSA array

  // ---- digit counter / control ------------------------------------------
  logic [CW-1:0] cnt;
  always_ff @(posedge clk or posedge clr) begin
    if (clr)     cnt <= '0;
    else if (ce) cnt <= (cnt == CW'(2*M-1)) ? '0 : cnt + 1'b1;
  end
  logic first, msd_half;
  assign first    = (cnt == '0);
  assign msd_half = (cnt >= CW'(M));
  assign x_first  = first;

  logic [N-1:0] xin;
  assign xin = msd_half ? '0 : x;

  // ---- cell A: a0 * x_k ---------------------------------------------------
  logic [N-1:0] l0, p01, p02, p03, ns, nc;
  ds_mult   #(.N(N), .M(M)) u_m_a0 (.clk, .ce, .clr, .b(a0), .y(xin),
                                    .lsd(l0), .s1(p01), .s2(p02), .s3(p03));
  ds_reduce #(.N(N))        u_r_a0 (.clk, .ce, .clr, .d0(l0), .d1(p01), .d2(p02), .d3(p03),
                                    .s(ns), .c(nc));

  // ---- cell B: a1 * x_{k-1}, with M delays before and after --------------
  logic [M:0][N-1:0] xd;
  assign xd[0] = xin;
  for (genvar k = 0; k < M; k++) begin : g_xd
    reg4 #(.W(N)) u_r (.clk, .ce, .clr, .d(xd[k]), .q(xd[k+1]));
  end
  logic [N-1:0] l1, p11, p12, p13, bs, bc;
  ds_mult   #(.N(N), .M(M)) u_m_a1 (.clk, .ce, .clr, .b(a1), .y(xd[M]),
                                    .lsd(l1), .s1(p11), .s2(p12), .s3(p13));
  ds_reduce #(.N(N))        u_r_a1 (.clk, .ce, .clr, .d0(l1), .d1(p11), .d2(p12), .d3(p13),
                                    .s(bs), .c(bc));
  logic [M:0][2*N-1:0] bd;
  assign bd[0] = {bs, bc};
  for (genvar k = 0; k < M; k++) begin : g_bd
    reg4 #(.W(2*N)) u_r (.clk, .ce, .clr, .d(bd[k]), .q(bd[k+1]));
  end
  logic [N-1:0] fs, fc;
  assign {fs, fc} = bd[M];

  // ---- recursive part: b1 * yhat_{k-1} -----------------------------------
  logic [N-1:0] yhat, l2, p21, p22, p23, rs, rc;
  ds_mult   #(.N(N), .M(M)) u_m_b1 (.clk, .ce, .clr, .b(b1), .y(yhat),
                                    .lsd(l2), .s1(p21), .s2(p22), .s3(p23));
  ds_reduce #(.N(N))        u_r_b1 (.clk, .ce, .clr, .d0(l2), .d1(p21), .d2(p22), .d3(p23),
                                    .s(rs), .c(rc));

  // ---- accumulation and final addition ----------------------------------
  logic [N-1:0] as_, ac_;
  csa_array #(.N(N), .PIPE(PIPE)) u_csa (.clk, .ce, .clr, .first,
                                         .ns, .nc, .rs, .rc, .fs, .fc, .s(as_), .c(ac_));
  // frame marks for the adder, delayed like its input when the array is piped
  logic first_a, msd_a;
  if (PIPE) begin : g_amark
    logic [1:0][1:0] am;
    reg4 #(.W(4)) u_am (.clk, .ce, .clr, .d({am[0], first, msd_half}), .q(am));
    assign {first_a, msd_a} = am[1];
  end else begin : g_amark
    assign {first_a, msd_a} = {first, msd_half};
  end
  bl_ds_adder #(.N(N)) u_add (.clk, .ce, .clr, .first(first_a), .ci(1'b0), .cnt(msd_a),
                              .s(as_), .c(ac_), .o(y), .t(yt));

  // ---- feedback delay: M-LAT stages --------------------------------------
  localparam int unsigned FD = M - LAT;
  logic [FD:0][N-1:0] fbd;
  assign fbd[0] = yt;
  for (genvar k = 0; k < FD; k++) begin : g_fbd
    reg4 #(.W(N)) u_r (.clk, .ce, .clr, .d(fbd[k]), .q(fbd[k+1]));
  end
  assign yhat = fbd[FD];

  // y_first: first delayed by the latency from x to y
  logic [LAT-1:0] fq;
  reg4 #(.W(LAT)) u_fq (.clk, .ce, .clr, .d({fq[LAT-2:0], first}), .q(fq));
  assign y_first = fq[LAT-1];

  initial assert (M >= LAT) else $error("ds_iir1 needs M >= %0d", LAT);
endmodule
