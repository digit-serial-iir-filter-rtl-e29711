// Full adder made of two half adders; the OR that merges the two half-adder
// carries is written as a NAND of the inverted carries, as in the design's
// NAND-only construction. s = a ^ b ^ cin, co = majority(a, b, cin).
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic co
);
  logic s1, c1, c2;
  half_adder u_ha1 (.a(a),  .b(b),   .s(s1), .c(c1));
  half_adder u_ha2 (.a(s1), .b(cin), .s(s),  .c(c2));
  always_comb co = ~(~c1 & ~c2);
endmodule
