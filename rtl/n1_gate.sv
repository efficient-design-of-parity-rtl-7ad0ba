// n1_gate: N1 block, a 4x4 reversible, parity-preserving gate.
//
//   P = D ? C : A,  Q = B ^ P,  R = A ^ C,  S = D
//
// D selects between A and C; with B=0 the selected bit appears twice (P and
// Q) and D passes through on S so that a row of N1 blocks can share one
// select line. The divider uses it to clear the accumulator at the start of
// a division (C=0). The equations follow the gate's truth table; its last
// rows (inputs 1101, 1110, 1111) are taken as 0111, 1000, 1001, the only
// assignment that keeps the table a parity-preserving permutation.
// Purely combinational.
module n1_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = d ? c : a;
  assign q = b ^ p;
  assign r = a ^ c;
  assign s = d;
endmodule
