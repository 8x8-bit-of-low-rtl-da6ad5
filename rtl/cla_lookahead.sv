// cla_lookahead: four-position carry look-ahead unit.
// From generate g, propagate p and carry in cin it forms every carry at once:
//   c1 = g0 + p0.cin
//   c2 = g1 + p1.g0 + p1.p0.cin
//   c3 = g2 + p2.g1 + p2.p1.g0 + p2.p1.p0.cin
//   c4 = g3 + p3.g2 + p3.p2.g1 + p3.p2.p1.g0 + p3.p2.p1.p0.cin
// and the group generate gg / propagate gp that let the same unit combine four
// 4-bit groups at the next level. Purely combinational.
module cla_lookahead (
  input  logic [3:0] g,
  input  logic [3:0] p,
  input  logic       cin,
  output logic [4:1] c,
  output logic       gg,
  output logic       gp
);
  always_comb begin
    c[1] = g[0] | (p[0] & cin);
    c[2] = g[1] | (p[1] & g[0]) | (p[1] & p[0] & cin);
    c[3] = g[2] | (p[2] & g[1]) | (p[2] & p[1] & g[0]) | (p[2] & p[1] & p[0] & cin);
    c[4] = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0])
         | (p[3] & p[2] & p[1] & p[0] & cin);
    gg   = g[3] | (p[3] & g[2]) | (p[3] & p[2] & g[1]) | (p[3] & p[2] & p[1] & g[0]);
    gp   = &p;
  end
endmodule : cla_lookahead
