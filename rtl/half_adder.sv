// half_adder: one-bit half adder, s = a ^ b, co = a & b.
// Used in the first carry-save row and the first cell of the final row of the
// array multiplier, and as the two's-complement increment chain in front of
// each Booth decoder row. The sum goes through the shared XOR cell.
// Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  xor_gate u_xor (.a(a), .b(b), .y(s));
  assign co = a & b;
endmodule : half_adder
