// bhpf_gate: BHPF gate, a 4x4 reversible, parity-preserving gate.
//
//   P = A,  Q = A ^ B,  R = B ^ C,  S = A ^ B ^ D
//
// The equations are the algebraic form of the gate's 16-row truth table.
// With A=C=D=0 it turns one signal B into three copies (Q, R, S), which the
// divider uses to fan out its add/subtract control. Purely combinational.
module bhpf_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  assign p = a;
  assign q = a ^ b;
  assign r = b ^ c;
  assign s = a ^ b ^ d;
endmodule
