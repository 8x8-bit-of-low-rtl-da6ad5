// cla_adder: W-bit two-level carry look-ahead adder.
// The operands are cut into 4-bit groups, each a cla4. The group generate and
// propagate signals go to a second-level cla_lookahead (the same circuit as
// inside each group), which delivers the carry into every group at once. For
// W = 16 that is one second-level unit; a wider W chains several 16-bit
// sections, each section's carry out feeding the next. W must be a multiple of
// 4. Purely combinational: s = a + b + cin, cout is the carry out of bit W-1.
module cla_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  localparam int unsigned NG = W / 4;         // 4-bit groups
  localparam int unsigned NS = (NG + 3) / 4;  // 16-bit sections

  logic [4*NS-1:0] gg, gp;  // group generate/propagate, padded with 0
  logic [4*NS:0]   gc;      // carry into each group
  logic [NS:0]     sc;      // carry into each section

  assign sc[0] = cin;

  for (genvar k = 0; k < 4*NS; k++) begin : g_grp
    if (k < NG) begin : g_used
      logic unused_cout;
      cla4 u_cla4 (
        .a(a[4*k +: 4]), .b(b[4*k +: 4]), .cin(gc[k]),
        .s(s[4*k +: 4]), .cout(unused_cout), .gg(gg[k]), .gp(gp[k])
      );
    end else begin : g_pad
      assign gg[k] = 1'b0;
      assign gp[k] = 1'b0;
    end
  end

  for (genvar m = 0; m < NS; m++) begin : g_sec
    logic [4:1] c;
    logic       unused_gg, unused_gp;
    cla_lookahead u_la2 (
      .g(gg[4*m +: 4]), .p(gp[4*m +: 4]), .cin(sc[m]),
      .c(c), .gg(unused_gg), .gp(unused_gp)
    );
    assign gc[4*m]   = sc[m];
    assign gc[4*m+1] = c[1];
    assign gc[4*m+2] = c[2];
    assign gc[4*m+3] = c[3];
    assign sc[m+1]   = c[4];
  end
  assign gc[4*NS] = sc[NS];

  assign cout = gc[NG];
endmodule : cla_adder
