// Digit-serial adder closing the digit-serial multiplier.
//
// Each cycle it adds the four redundant digits that the last multiplier cell
// delivers (lsd, s1, s2, s3) into one N-bit product digit: two carry save
// adders (ds_reduce) bring them to a sum/carry pair, a carry ripple adder adds
// that pair. Every carry that leaves the top of a CSA or of the CRA belongs to
// the next digit and is delayed one cycle before it re-enters at the least
// significant position, so there is no carry path from cycle to cycle longer
// than one flip-flop. A register at the output gives the multiplier a full
// cycle to finish each digit.
//
// Timing: the product digit of significance t, whose terms arrive in cycle t,
// is on o in cycle t+1. Clock enable ce, asynchronous clear clr.
module ds_adder #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         clr,
  input  logic [N-1:0] lsd,
  input  logic [N-1:0] s1,
  input  logic [N-1:0] s2,
  input  logic [N-1:0] s3,
  output logic [N-1:0] o
);
  logic [N-1:0] rs, rc, sum;
  logic         co, cin;
  ds_reduce #(.N(N)) u_red (.clk, .ce, .clr, .d0(lsd), .d1(s1), .d2(s2), .d3(s3), .s(rs), .c(rc));
  cra #(.N(N)) u_cra (.a(rs), .b(rc), .cin(cin), .s(sum), .co(co));
  reg4 #(.W(1)) u_rc (.clk, .ce, .clr, .d(co),  .q(cin));
  reg4 #(.W(N)) u_ro (.clk, .ce, .clr, .d(sum), .q(o));
endmodule
