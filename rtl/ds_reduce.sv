// Two carry save adders that reduce four N-bit digits of equal significance
// to a sum digit s and a carry digit c (the two-digit form in which a
// digit-serial multiplier hands its product on).
//
// CSA 1 adds d1, d2, d3; CSA 2 adds its sum, its shifted carry vector and d0.
// Shifting a carry vector left by one frees its least significant position
// and pushes its top bit to the next significance. That top bit is kept in a
// register for one cycle (the next digit is the next significance in
// digit-serial data) and then enters the freed position of the same CSA.
//
//   d0 + d1 + d2 + d3 + (bits fed back this cycle)
//     = s + c + 2^N * (bits registered this cycle)
//
// Timing: s and c are combinational in the inputs; two flip-flops hold the
// delayed carries (clock enable ce, asynchronous clear clr).
module ds_reduce #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         clr,
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic [N-1:0] d2,
  input  logic [N-1:0] d3,
  output logic [N-1:0] s,
  output logic [N-1:0] c
);
  logic [1:0]   fb;
  logic [N-1:0] s1, c1, c1s, c2;
  csa #(.N(N)) u_csa1 (.a(d1), .b(d2),  .c(d3), .s(s1), .co(c1));
  assign c1s = {c1[N-2:0], fb[0]};
  csa #(.N(N)) u_csa2 (.a(s1), .b(c1s), .c(d0), .s(s),  .co(c2));
  assign c = {c2[N-2:0], fb[1]};
  reg4 #(.W(2)) u_rfb (.clk, .ce, .clr, .d({c2[N-1], c1[N-1]}), .q(fb));
endmodule
