// Reduced multiplier system sized for a small FPGA: the multiplicand is the
// constant B_CONST (45123 by default), the multiplier word yy is serialised by
// the parallel-in/serial-out register, and the product leaves one N-bit digit
// per cycle on o through the multiplier's single output register; there is no
// serial-in/parallel-out register.
//
// Timing: after clr, digit t of B_CONST*yy (least significant first) is on o
// after t+1 enabled clock edges, t = 0 .. 2M-1, and the sequence repeats every
// 2M cycles. Clock enable ce, asynchronous clear clr.
module ds_mult_fpga #(
  parameter int unsigned   N       = 4,
  parameter int unsigned   M       = 4,
  parameter logic [N*M-1:0] B_CONST = (N*M)'(45123)
) (
  input  logic           clk,
  input  logic           ce,
  input  logic           clr,
  input  logic [N*M-1:0] yy,
  output logic [N-1:0]   o
);
  logic [N-1:0]           y;
  logic [$clog2(2*M)-1:0] cnt;   // frame position; nothing here needs it
  piso          #(.N(N), .M(M)) u_piso (.clk, .ce, .clr, .yy, .y, .cnt);
  ds_mult_adder #(.N(N), .M(M)) u_mul  (.clk, .ce, .clr, .b(B_CONST), .y, .o);
endmodule
