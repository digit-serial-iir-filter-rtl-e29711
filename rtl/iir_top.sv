// Top level: the first-order digit-serial IIR filter (ports f_*), the same
// filter generalised to order K (ports k_*; a[l] = a_l, b[l] = b_l) and,
// beside them, the two test systems built around the 16 x 16 bit digit-serial
// multiplier: the version with input and output shift registers (ports m_*)
// and the reduced FPGA version with a fixed multiplicand (ports p_*).
// The four share clk, ce and clr and are otherwise independent; see the
// individual modules for formats and timing.
module iir_top #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4,
  parameter int unsigned K = 2
) (
  input  logic             clk,
  input  logic             ce,
  input  logic             clr,
  // filter
  input  logic [N*M-1:0]   f_a0,
  input  logic [N*M-1:0]   f_a1,
  input  logic [N*M-1:0]   f_b1,
  input  logic [N-1:0]     f_x,
  output logic [N-1:0]     f_y,
  output logic [N-1:0]     f_yt,
  output logic             f_x_first,
  output logic             f_y_first,
  // K-th order filter
  input  logic [K:0][N*M-1:0] k_a,
  input  logic [K:1][N*M-1:0] k_b,
  input  logic [N-1:0]     k_x,
  output logic [N-1:0]     k_y,
  output logic [N-1:0]     k_yt,
  output logic             k_x_first,
  output logic             k_y_first,
  // multiplier with shift registers
  input  logic [N*M-1:0]   m_b,
  input  logic [N*M-1:0]   m_yy,
  output logic [2*N*M-1:0] m_o,
  // FPGA version
  input  logic [N*M-1:0]   p_yy,
  output logic [N-1:0]     p_o
);
  ds_iir1 #(.N(N), .M(M)) u_iir (
    .clk, .ce, .clr, .a0(f_a0), .a1(f_a1), .b1(f_b1), .x(f_x),
    .y(f_y), .yt(f_yt), .x_first(f_x_first), .y_first(f_y_first));
  ds_iirk #(.N(N), .M(M), .K(K)) u_iirk (
    .clk, .ce, .clr, .a(k_a), .b(k_b), .x(k_x),
    .y(k_y), .yt(k_yt), .x_first(k_x_first), .y_first(k_y_first));
  ds_mult_sr #(.N(N), .M(M)) u_msr (.clk, .ce, .clr, .b(m_b), .yy(m_yy), .o(m_o));
  ds_mult_fpga #(.N(N), .M(M)) u_mfp (.clk, .ce, .clr, .yy(p_yy), .o(p_o));
endmodule
