// frg_gate: Fredkin gate, a 3x3 reversible, parity-preserving controlled swap.
//
//   P = A,  Q = A ? C : B,  R = A ? B : C
//
// A is the control and passes straight through, so several gates can share
// one select line by chaining P into the next gate's A. Q is a 2:1
// multiplexer output (B when A=0, C when A=1); R carries the unselected
// input. Purely combinational; the function is the gate's truth table.
module frg_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  assign p = a;
  assign q = a ? c : b;
  assign r = a ? b : c;
endmodule
