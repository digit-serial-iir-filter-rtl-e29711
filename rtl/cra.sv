// N-bit carry ripple adder: a chain of full adders, the carry of each bit
// feeding the next. {co, s} = a + b + cin. Combinational; the delay grows
// with N.
module cra #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         co
);
  logic [N:0] c;
  assign c[0] = cin;
  for (genvar k = 0; k < N; k++) begin : g_fa
    full_adder u_fa (.a(a[k]), .b(b[k]), .cin(c[k]), .s(s[k]), .co(c[k+1]));
  end
  assign co = c[N];
endmodule
