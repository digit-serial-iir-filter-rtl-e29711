// N-bit carry save adder: N independent full adders, one per bit position.
// Three N-bit digits a, b, c are reduced to a sum vector s and a carry
// vector co where co[k] carries weight 2^(k+1):  a + b + c = s + 2*co.
// Nothing propagates between positions, so the delay is one full adder.
// Combinational. Shifting co and placing the top carry elsewhere is left to
// the instantiating module.
module csa #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] co
);
  for (genvar k = 0; k < N; k++) begin : g_fa
    full_adder u_fa (.a(a[k]), .b(b[k]), .cin(c[k]), .s(s[k]), .co(co[k]));
  end
endmodule
