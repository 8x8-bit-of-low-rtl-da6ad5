// booth_decoder_cell: one bit of a Booth decoder (partial-product generator).
// A multiplexer picks the multiplicand bit a(j) when the row asks for 1x, the
// bit one place lower, a(j-1), when it asks for 2x (the shift by one), and 0
// otherwise; an XOR cell then inverts the picked bit when the row is negative.
// The result is the one's complement form of the bit; the +1 that completes
// the two's complement is added by the half-adder chain of booth_decoder.
// Purely combinational.
module booth_decoder_cell
  import mult_pkg::*;
(
  input  logic       a_j,    // multiplicand bit j
  input  logic       a_jm1,  // multiplicand bit j-1 (0 below bit 0)
  input  booth_sel_t sel,
  output logic       q       // selected bit, inverted when sel.neg
);
  logic m;
  always_comb begin
    unique case ({sel.one, sel.two})
      2'b10:   m = a_j;
      2'b01:   m = a_jm1;
      default: m = 1'b0;   // zero row (2'b11 is never produced by the encoder)
    endcase
  end
  xor_gate u_xor (.a(m), .b(sel.neg), .y(q));
endmodule : booth_decoder_cell
