// Digit-serial / parallel multiplier: M cells cascaded.
//
// The multiplicand b (M digits of N bits) is held in parallel; cell j holds
// digit j, with cell M-1 (most significant) on the left and cell 0 on the
// right. The multiplier enters one N-bit digit per cycle on y, least
// significant digit first, and is broadcast to all cells. A word is M digits
// followed by M zero digits, so one product takes 2M cycles. LSDs move right
// combinationally, partial results move right through one register per cell.
//
// Output: the product digit of significance t (t counted from the cycle the
// first multiplier digit is applied) is, in cycle t,
//   lsd + s1 + s2 + s3 + (carries still held inside the digit-serial adder)
// i.e. a redundant form that a digit-serial adder (ds_adder) or a CSA pair
// (ds_reduce) turns into a digit. Since a product of two M-digit words fits
// in 2M digits, nothing is left in the cells when the next word starts, and
// words can follow each other back to back.
module ds_mult #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4
) (
  input  logic           clk,
  input  logic           ce,
  input  logic           clr,
  input  logic [N*M-1:0] b,
  input  logic [N-1:0]   y,
  output logic [N-1:0]   lsd,
  output logic [N-1:0]   s1,
  output logic [N-1:0]   s2,
  output logic [N-1:0]   s3
);
  // index j carries the signals leaving cell j towards cell j-1;
  // index M is the empty input of the leftmost cell.
  logic [M:0][N-1:0] l, p1, p2, p3;
  assign l[M]  = '0;
  assign p1[M] = '0;
  assign p2[M] = '0;
  assign p3[M] = '0;
  for (genvar j = 0; j < M; j++) begin : g_cell
    ds_mult_cell #(.N(N)) u_cell (
      .clk, .ce, .clr,
      .b(b[j*N +: N]), .y(y),
      .lsd_in(l[j+1]), .s1_in(p1[j+1]), .s2_in(p2[j+1]), .s3_in(p3[j+1]),
      .lsd_out(l[j]), .s1_out(p1[j]), .s2_out(p2[j]), .s3_out(p3[j])
    );
  end
  assign lsd = l[0];
  assign s1  = p1[0];
  assign s2  = p2[0];
  assign s3  = p3[0];
endmodule
