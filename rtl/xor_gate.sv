// xor_gate: two-input exclusive OR.
// The multipliers build their full adders, half adders, Booth encoder and
// Booth decoder around one XOR cell (a 6-transistor pass-transistor XOR in the
// original circuit). Here it is kept as a module of its own so the gate-level
// structure stays visible; its behaviour is y = a ^ b. Purely combinational.
module xor_gate (
  input  logic a,
  input  logic b,
  output logic y
);
  assign y = a ^ b;
endmodule : xor_gate
