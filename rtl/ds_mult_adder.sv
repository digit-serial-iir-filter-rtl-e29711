// Digit-serial multiplier with its digit-serial adder: the complete
// (N*M) x (N*M) bit multiplier, 16 x 16 bits by default.
//
// b is the multiplicand, held in parallel for the whole product. The
// multiplier enters on y one N-bit digit per cycle, least significant first:
// M digits of the word, then M zero digits that let the array finish. The
// 2M digits of the 2*N*M bit product leave on o, least significant first,
// one per cycle, each one cycle after the cycle in which the matching
// multiplier digit was applied (output register). A new word can start every
// 2M cycles. Clock enable ce, asynchronous clear clr for all registers.
module ds_mult_adder #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4
) (
  input  logic           clk,
  input  logic           ce,
  input  logic           clr,
  input  logic [N*M-1:0] b,
  input  logic [N-1:0]   y,
  output logic [N-1:0]   o
);
  logic [N-1:0] lsd, s1, s2, s3;
  ds_mult  #(.N(N), .M(M)) u_mult (.clk, .ce, .clr, .b, .y, .lsd, .s1, .s2, .s3);
  ds_adder #(.N(N))        u_add  (.clk, .ce, .clr, .lsd, .s1, .s2, .s3, .o);
endmodule
