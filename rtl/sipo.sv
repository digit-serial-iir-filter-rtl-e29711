// Serial-in to parallel-out register collecting the 2M product digits.
//
// A chain of 2M N-bit registers. Each enabled clock the incoming digit d
// enters the most significant register and every register passes its digit
// to the next less significant one. After 2M clocks the first digit that
// arrived (the product's LSD) sits in the least significant register, and
// o = {O[2M-1], ..., O[0]} is the product as one word.
// Clock enable ce, asynchronous clear clr.
module sipo #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             clr,
  input  logic [N-1:0]     d,
  output logic [2*N*M-1:0] o
);
  logic [2*M:0][N-1:0] st;
  assign st[2*M] = d;
  for (genvar k = 0; k < 2*M; k++) begin : g_stage
    reg4 #(.W(N)) u_r (.clk, .ce, .clr, .d(st[k+1]), .q(st[k]));
    assign o[k*N +: N] = st[k];
  end
endmodule
