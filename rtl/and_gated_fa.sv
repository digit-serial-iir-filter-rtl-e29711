// AND-gated full adder: the basic bit cell of the radix-2^n arithmetic.
// One input of a full adder is the partial-product bit a0 & a1 (a0 is a bit
// of the coefficient digit V_j, a1 a bit of the data digit U_i).
// s = (a0 & a1) ^ b ^ cin, co = majority(a0 & a1, b, cin). Combinational.
module and_gated_fa (
  input  logic a0,
  input  logic a1,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic co
);
  logic pp;
  always_comb pp = a0 & a1;
  full_adder u_fa (.a(pp), .b(b), .cin(cin), .s(s), .co(co));
endmodule
