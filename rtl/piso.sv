// Parallel-in to serial-out register feeding the digit-serial multiplier.
//
// A 2M-state counter (3 bits for M = 4) steps once per enabled clock. Its
// value selects, through N multiplexers of 2M inputs, digit cnt of the
// parallel word yy while cnt < M and zero for the other M states, which are
// the zero digits the multiplier needs after each word. The word therefore
// repeats every 2M cycles, least significant digit first.
//
// Timing: after clr (asynchronous, counter to 0) y shows digit 0 of yy; it
// moves to the next digit at each rising clock edge with ce high. y is
// combinational in cnt and yy.
module piso #(
  parameter int unsigned N = 4,
  parameter int unsigned M = 4
) (
  input  logic                   clk,
  input  logic                   ce,
  input  logic                   clr,
  input  logic [N*M-1:0]         yy,
  output logic [N-1:0]           y,
  output logic [$clog2(2*M)-1:0] cnt
);
  localparam int unsigned CW = $clog2(2*M);
  always_ff @(posedge clk or posedge clr) begin
    if (clr)     cnt <= '0;
    else if (ce) cnt <= (cnt == CW'(2*M-1)) ? '0 : cnt + 1'b1;
  end
  always_comb begin
    y = '0;
    for (int unsigned k = 0; k < M; k++)
      if (cnt == CW'(k)) y = yy[k*N +: N];
  end
endmodule
