// booth_decoder: W-bit Booth decoder, the partial-product generator of one row.
// Input a is the multiplicand already widened by one sign bit (W-1 bits); the
// row value is sel * a with sel in {0, +1, -1, +2, -2}, returned as a W-bit two's
// complement number so that +-2a always fits. Each bit is a
// booth_decoder_cell (MUX + XOR, giving the one's complement); a ripple chain
// of W half adders in front of the output adds MI (sel.neg) at bit 0, turning
// the one's complement into the two's complement inside the row. The carry out
// of the chain is dropped (it is only set for the -0 code, whose row is 0).
// Purely combinational. The default W = 10 serves an 8-bit multiplicand in
// both signed and unsigned mode; a signed-only 8x8 design needs 9 bits.
module booth_decoder
  import mult_pkg::*;
#(
  parameter int unsigned W = 10
) (
  input  logic [W-2:0] a,    // multiplicand, sign-extended by one bit
  input  booth_sel_t   sel,
  output logic [W-1:0] pp    // two's complement partial product
);
  logic [W-1:0] a_x;   // a with its top bit repeated to W bits
  logic [W-1:0] q;     // one's complement row
  logic [W:0]   c;     // increment chain carries
  logic         unused_cout;

  assign a_x = {a[W-2], a};
  assign c[0] = sel.neg;
  assign unused_cout = c[W];

  for (genvar j = 0; j < W; j++) begin : g_bit
    booth_decoder_cell u_cell (
      .a_j  (a_x[j]),
      .a_jm1((j == 0) ? 1'b0 : a_x[(j == 0) ? 0 : j-1]),
      .sel  (sel),
      .q    (q[j])
    );
    half_adder u_ha (.a(q[j]), .b(c[j]), .s(pp[j]), .co(c[j+1]));
  end
endmodule : booth_decoder
