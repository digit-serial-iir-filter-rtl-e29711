// Bit-level pipelined digit-serial adder.
//
// Adds a sum digit s and a carry digit c per cycle into one output digit,
// without a carry loop through a carry ripple adder. A first carry ripple
// adder forms D = s + c with carry-out c1 (no carry-in). D and c1 are
// registered (pipeline stage). The carry k into the current digit comes from
// the previous digit and is applied by a second adder, O = D + k. The carry
// into the next digit is c1 OR (k AND (D == all ones)): D == 2^N-1 is found
// by an AND tree, and c1 and an all-ones D cannot occur together. The only
// loop is this AND/OR and one flip-flop, so the rest can be pipelined freely.
//
// first marks the first digit of a word: its carry-in is ci instead of the
// carry left over from the previous word. cnt is the truncation control,
// given with the digit it applies to: t = O when cnt is 1, else 0.
//
// Timing: s, c, first and cnt of cycle i produce o and t in cycle i+2 (one
// pipeline register, one output register). Clock enable ce, asynchronous
// clear clr.
module bl_ds_adder #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         clr,
  input  logic         first,
  input  logic         ci,
  input  logic         cnt,
  input  logic [N-1:0] s,
  input  logic [N-1:0] c,
  output logic [N-1:0] o,
  output logic [N-1:0] t
);
  // stage 1: first CRA
  logic [N-1:0] d1;
  logic         c1;
  cra #(.N(N)) u_cra1 (.a(s), .b(c), .cin(1'b0), .s(d1), .co(c1));

  logic [N-1:0] dq;
  logic         c1q, firstq, cntq;
  reg4 #(.W(N+3)) u_p (.clk, .ce, .clr, .d({d1, c1, first, cnt}), .q({dq, c1q, firstq, cntq}));

  // stage 2: carry selection and second CRA
  logic kq, k, all1, kn;
  logic [N-1:0] osum;
  logic         oco;   // equals all1 & k, which kn already covers: not used
  assign k    = firstq ? ci : kq;
  assign all1 = &dq;
  assign kn   = c1q | (all1 & k);
  cra #(.N(N)) u_cra2 (.a(dq), .b('0), .cin(k), .s(osum), .co(oco));
  reg4 #(.W(1)) u_k (.clk, .ce, .clr, .d(kn), .q(kq));

  reg4 #(.W(2*N)) u_o (.clk, .ce, .clr, .d({osum, osum & {N{cntq}}}), .q({o, t}));
endmodule
