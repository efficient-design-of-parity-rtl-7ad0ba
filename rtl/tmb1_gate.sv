// tmb1_gate: TMB1 block, a 5x5 reversible, parity-preserving adder cell.
//
//   P = ~A
//   Q = ~(A ^ B)
//   R = A ^ B ^ C ^ D
//   S = ((A ^ B) ? C : D) ^ (A & B)
//   T = E ^ B ^ S
//
// With D=E=0 the block is a full adder: R is the sum of A, B and the carry
// in C, and S is the carry out; P, Q and T are garbage outputs. The
// equations are the algebraic form of the 32-row truth table; two rows of
// that table (inputs 10101 and 10110) are taken as 00010 and 00111, the only
// reading under which the table is a permutation that preserves parity.
// Purely combinational.
module tmb1_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic p,
  output logic q,
  output logic r,
  output logic s,
  output logic t
);
  logic hx;
  assign hx = a ^ b;
  assign p  = ~a;
  assign q  = ~hx;
  assign r  = hx ^ c ^ d;
  assign s  = (hx ? c : d) ^ (a & b);
  assign t  = e ^ b ^ s;
endmodule
