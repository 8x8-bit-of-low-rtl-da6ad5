// full_adder: one-bit full adder built from two XOR cells.
// s = (a ^ b) ^ ci; the carry out is the majority, formed here as
// co = (a & b) | (ci & (a ^ b)), reusing the first XOR as the propagate
// signal. The transistor-level sizing of the original cell (30 transistors
// with 6-transistor XORs) has no RTL counterpart; only its logic is kept.
// Purely combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  logic p;
  xor_gate u_xor0 (.a(a), .b(b),  .y(p));
  xor_gate u_xor1 (.a(p), .b(ci), .y(s));
  assign co = (a & b) | (ci & p);
endmodule : full_adder
