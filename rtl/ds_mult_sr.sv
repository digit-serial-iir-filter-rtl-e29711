// Digit-serial multiplier with shift registers: a self-contained test system
// for the (N*M) x (N*M) digit-serial multiplier.
//
// The multiplier word yy is turned into digits by the parallel-in/serial-out
// register (word digits then zeros, repeating every 2M cycles), multiplied by
// the parallel multiplicand b, and the product digits are caught by the
// serial-in/parallel-out register, so that o holds the full 2*N*M bit product.
//
// Timing: after clr, o holds b*yy from the (2M+1)-th enabled clock edge on,
// and keeps it while b and yy stay unchanged (the same product is recomputed
// every 2M cycles). Changes of b or yy show 2M+1 edges after the next word
// boundary. Clock enable ce, asynchronous clear clr.
module ds_mult_sr #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             clr,
  input  logic [N*M-1:0]   b,
  input  logic [N*M-1:0]   yy,
  output logic [2*N*M-1:0] o
);
  logic [N-1:0]           y, p;
  logic [$clog2(2*M)-1:0] cnt;   // frame position; nothing here needs it
  piso          #(.N(N), .M(M)) u_piso (.clk, .ce, .clr, .yy, .y, .cnt);
  ds_mult_adder #(.N(N), .M(M)) u_mul  (.clk, .ce, .clr, .b, .y, .o(p));
  sipo          #(.N(N), .M(M)) u_sipo (.clk, .ce, .clr, .d(p), .o);
endmodule
