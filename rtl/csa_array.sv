// Carry save adder array of the IIR filter cell.
//
// Adds three sum/carry digit pairs of equal significance: the nonrecursive
// product (ns, nc), the recursive product (rs, rc) and the pair arriving from
// the following filter cell (fs, fc), and leaves one pair (s, c) for the
// bit-level pipelined digit-serial adder. Four CSAs do it:
//   A: ns + nc + fs      B: rs + rc + fc
//   C: A.sum + A.carry + B.sum      D: C.sum + C.carry + B.carry -> s, c
// The top carry of each CSA belongs to the next digit; a 4-bit register
// delays these four bits by one cycle and each re-enters its CSA's freed
// least significant carry position.
//
// first marks the first digit of a word: the delayed carries are then
// dropped, so a sum that overflows 2M digits does not spill into the next
// word (results are taken modulo 2^(2*N*M)).
//
// Timing: with PIPE = 0 (default, the 16-bit build) s and c are
// combinational in the inputs of the same cycle. With PIPE = 1 the array is
// cut into three stages for sub-digit pipelining of the filter loop: the
// outputs of A and B are registered before C, and those of C (with B's carry,
// now delayed twice) before D, so s and c follow the inputs by 2 cycles.
// Each CSA then sees its own, delayed, copy of first. This is the source
// architecture's arrangement for long words (32 digits), where the loop has
// slack for it; the pairing above is the one it draws.
// Clock enable ce, asynchronous clear clr.
module csa_array #(
  parameter int unsigned N    = 4,
  parameter bit          PIPE = 1'b0
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         clr,
  input  logic         first,
  input  logic [N-1:0] ns,
  input  logic [N-1:0] nc,
  input  logic [N-1:0] rs,
  input  logic [N-1:0] rc,
  input  logic [N-1:0] fs,
  input  logic [N-1:0] fc,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);
  logic [3:0]   fbq, fb;
  logic [N-1:0] sa, ca, sb, cb, sc, cc, cd;
  logic [N-1:0] cas, cbs, ccs;
  // inputs of C and D after the optional pipeline registers
  logic [N-1:0] sa_p, cas_p, sb_p, sc_p, ccs_p, cbs_p;
  logic         first_c, first_d;

  assign fb[0] = first   ? 1'b0 : fbq[0];
  assign fb[1] = first   ? 1'b0 : fbq[1];
  assign fb[2] = first_c ? 1'b0 : fbq[2];
  assign fb[3] = first_d ? 1'b0 : fbq[3];

  csa #(.N(N)) u_csa_a (.a(ns), .b(nc),  .c(fs),  .s(sa), .co(ca));
  csa #(.N(N)) u_csa_b (.a(rs), .b(rc),  .c(fc),  .s(sb), .co(cb));
  assign cas = {ca[N-2:0], fb[0]};
  assign cbs = {cb[N-2:0], fb[1]};
  csa #(.N(N)) u_csa_c (.a(sa_p), .b(cas_p), .c(sb_p),  .s(sc), .co(cc));
  assign ccs = {cc[N-2:0], fb[2]};
  csa #(.N(N)) u_csa_d (.a(sc_p), .b(ccs_p), .c(cbs_p), .s(s),  .co(cd));
  assign c = {cd[N-2:0], fb[3]};

  if (PIPE) begin : g_pipe
    logic [N-1:0] cbs_1;
    logic [1:0]   fq;
    reg4 #(.W(4*N)) u_p1 (.clk, .ce, .clr, .d({sa, cas, sb, cbs}),
                          .q({sa_p, cas_p, sb_p, cbs_1}));
    reg4 #(.W(3*N)) u_p2 (.clk, .ce, .clr, .d({sc, ccs, cbs_1}),
                          .q({sc_p, ccs_p, cbs_p}));
    reg4 #(.W(2))   u_pf (.clk, .ce, .clr, .d({fq[0], first}), .q(fq));
    assign first_c = fq[0];
    assign first_d = fq[1];
  end else begin : g_comb
    assign {sa_p, cas_p, sb_p} = {sa, cas, sb};
    assign {sc_p, ccs_p, cbs_p} = {sc, ccs, cbs};
    assign first_c = first;
    assign first_d = first;
  end

  reg4 #(.W(4)) u_rfb (.clk, .ce, .clr,
                       .d({cd[N-1], cc[N-1], cb[N-1], ca[N-1]}), .q(fbq));
endmodule
