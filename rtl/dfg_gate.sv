// dfg_gate: Double Feynman gate, a 3x3 reversible, parity-preserving gate.
//
//   P = A,  Q = A ^ B,  R = A ^ C
//
// With B and C tied to constants it copies A twice (B=C=0) or produces a
// copy and a complement of A (B=0, C=1); this is how the divider fans out
// stored bits without breaking the parity of the circuit. Purely
// combinational; the function is the gate's published truth table.
module dfg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ^ b;
  assign r = a ^ c;
endmodule
