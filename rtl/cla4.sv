// cla4: 4-bit carry look-ahead adder.
// Per bit it forms generate g = a & b and propagate p = a ^ b (XOR cell), takes
// all four carries at once from cla_lookahead, and forms the sum s = p ^ c.
// It also passes out the group generate/propagate for a second look-ahead
// level. Purely combinational.
module cla4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  input  logic       cin,
  output logic [3:0] s,
  output logic       cout,
  output logic       gg,
  output logic       gp
);
  logic [3:0] g, p;
  logic [4:0] c;

  assign g = a & b;
  assign c[0] = cin;
  for (genvar i = 0; i < 4; i++) begin : g_bit
    xor_gate u_p (.a(a[i]), .b(b[i]), .y(p[i]));
    xor_gate u_s (.a(p[i]), .b(c[i]), .y(s[i]));
  end

  cla_lookahead u_la (.g(g), .p(p), .cin(cin), .c(c[4:1]), .gg(gg), .gp(gp));
  assign cout = c[4];
endmodule : cla4
