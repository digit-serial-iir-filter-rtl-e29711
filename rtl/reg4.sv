// W-bit register of D flip-flops with clock enable and asynchronous clear
// (the FDCE behaviour): clr high forces q to 0 at once and overrides all;
// otherwise q takes d on the rising clock edge when ce is high and holds
// when ce is low. The default width of 4 is one digit.
module reg4 #(
  parameter int unsigned W = 4
) (
  input  logic         clk,
  input  logic         ce,
  input  logic         clr,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  always_ff @(posedge clk or posedge clr) begin
    if (clr)     q <= '0;
    else if (ce) q <= d;
  end
endmodule
