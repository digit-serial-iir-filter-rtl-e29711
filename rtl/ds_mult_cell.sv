// Cell of the digit-serial multiplier (radix-2^N, N = digit size).
//
// Each cycle the cell multiplies its coefficient digit b by the serial data
// digit y. The N x N product is formed in a carry-save array of AND-gated
// full adders: the low N bits leave the right side of the array fully
// resolved (the LSD), the high N bits leave the bottom as a sum vector and a
// carry vector (the MSD in carry-save form).
//
// The LSD goes, without a register, to the cell on the right (lsd_out), where
// it has the same significance as that cell's MSD. The MSD of this cell is
// summed with the LSD arriving from the cell on the left (lsd_in) and with the
// three partial-result digits s1_in..s3_in coming from the left by three
// carry save adders. Their results leave, one cycle later, as the three
// partial-result digits s1_out..s3_out for the cell on the right. The carry
// out of the top full adder of each CSA has the next significance, which this
// same cell handles in the next cycle: it is held in a register and fed back
// into the empty least significant position of the same CSA's shifted carry
// vector. This keeps the carry local (no carry chain across cells) and is the
// cell recurrence {c, s} = MSD(b_j y_i) + LSD(b_{j+1} y_i) + s_in + c_prev.
//
// Invariant: lsd_in + MSD + s1_in + s2_in + s3_in + fed-back carries
//          = s1_out + s2_out + s3_out + 2^N * (new carries).
//
// Timing: lsd_out is combinational; s*_out are registered (one cycle).
// Registers have clock enable ce and asynchronous clear clr.
// The digit flow, the carry-save array, the cascade of CSAs and the local
// carry feedback follow the design; the exact bit placement of the design's
// cell (which puts lsd_in into free positions of the array and uses two CSAs)
// is not reproduced: here lsd_in gets a CSA of its own.
module ds_mult_cell #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         clr,
  input  logic [N-1:0] b,
  input  logic [N-1:0] y,
  input  logic [N-1:0] lsd_in,
  input  logic [N-1:0] s1_in,
  input  logic [N-1:0] s2_in,
  input  logic [N-1:0] s3_in,
  output logic [N-1:0] lsd_out,
  output logic [N-1:0] s1_out,
  output logic [N-1:0] s2_out,
  output logic [N-1:0] s3_out
);
  // ---- carry-save array multiplier -------------------------------------
  // sv[k], cv[k]: sum and carry vectors entering row k; position i of row k
  // has weight 2^(k+i).
  logic [N:0][N-1:0] sv, cv;
  logic [N-1:0][N-1:0] rs, rc;   // row outputs
  assign sv[0] = '0;
  assign cv[0] = '0;
  for (genvar k = 0; k < N; k++) begin : g_row
    for (genvar i = 0; i < N; i++) begin : g_col
      and_gated_fa u_agfa (
        .a0(b[i]), .a1(y[k]), .b(sv[k][i]), .cin(cv[k][i]),
        .s(rs[k][i]), .co(rc[k][i])
      );
    end
    assign lsd_out[k] = rs[k][0];
    assign sv[k+1]    = {1'b0, rs[k][N-1:1]};
    assign cv[k+1]    = rc[k];
  end
  // high half of the product in carry-save form (weight base 2^N)
  logic [N-1:0] hs, hc;
  assign hs = sv[N];
  assign hc = cv[N];

  // ---- partial-result accumulation -----------------------------------
  logic [2:0]   fb;                 // fed-back top carries of CSA A, B, C
  logic [N-1:0] sa, ca, sb, cb, sc, cc;
  logic [N-1:0] cas, cbs, ccs;      // shifted carry vectors

  csa #(.N(N)) u_csa_a (.a(hs),  .b(hc),    .c(lsd_in), .s(sa), .co(ca));
  assign cas = {ca[N-2:0], fb[0]};
  csa #(.N(N)) u_csa_b (.a(sa),  .b(cas),   .c(s1_in),  .s(sb), .co(cb));
  assign cbs = {cb[N-2:0], fb[1]};
  csa #(.N(N)) u_csa_c (.a(cbs), .b(s2_in), .c(s3_in),  .s(sc), .co(cc));
  assign ccs = {cc[N-2:0], fb[2]};

  reg4 #(.W(N)) u_r1  (.clk, .ce, .clr, .d(sb),  .q(s1_out));
  reg4 #(.W(N)) u_r2  (.clk, .ce, .clr, .d(sc),  .q(s2_out));
  reg4 #(.W(N)) u_r3  (.clk, .ce, .clr, .d(ccs), .q(s3_out));
  reg4 #(.W(3)) u_rfb (.clk, .ce, .clr, .d({cc[N-1], cb[N-1], ca[N-1]}), .q(fb));
endmodule
