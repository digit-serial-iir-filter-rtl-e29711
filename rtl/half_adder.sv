// Half adder built from five 2-input NAND gates.
// s = a xor b, c = a and b. The NAND form follows the gate-count-minimising
// construction of the design: one shared NAND of a and b, two NANDs that
// each combine an input with it, a fourth that merges them into the sum, and
// a fifth that inverts the shared NAND to give the carry.
// Purely combinational, no timing of its own.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  logic nab, n1, n2;
  always_comb begin
    nab = ~(a & b);
    n1  = ~(a & nab);
    n2  = ~(b & nab);
    s   = ~(n1 & n2);
    c   = ~(nab & nab);
  end
endmodule
