// booth_encoder: radix-4 modified Booth encoder for one digit.
// It looks at three overlapping multiplier bits {x(2i+1), x(2i), x(2i-1)} and
// produces the controls of one partial-product row, following the encoder
// truth table exactly:
//   MI (neg) = x(2i+1)
//   X  (one) = x(2i) XOR x(2i-1)
//   X2 (two) = (x(2i+1) XOR x(2i)) AND NOT (x(2i) XOR x(2i-1))
// so the digit value is (-2*x(2i+1) + x(2i) + x(2i-1)) in {-2..+2}. The codes
// 000 and 111 both give a zero row (111 sets MI with neither multiple).
// Built from the XOR cell, an inverter and AND gates. Purely combinational.
module booth_encoder
  import mult_pkg::*;
(
  input  logic [2:0]  grp,  // {x(2i+1), x(2i), x(2i-1)}
  output booth_sel_t  sel
);
  logic x_lo, x_hi;
  xor_gate u_xor_lo (.a(grp[1]), .b(grp[0]), .y(x_lo));
  xor_gate u_xor_hi (.a(grp[2]), .b(grp[1]), .y(x_hi));

  always_comb begin
    sel.neg = grp[2];
    sel.one = x_lo;
    sel.two = x_hi & ~x_lo;
  end
endmodule : booth_encoder
