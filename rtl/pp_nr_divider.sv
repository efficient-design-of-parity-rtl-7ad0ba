// pp_nr_divider: n-bit non-restoring divider of unsigned integers built
// from parity-preserving reversible gates and latch storage.
//
// Registers: M (n-bit latch register) holds the divisor, Q (n-bit PIPO
// left-shift register) holds the dividend and collects the quotient, and A
// (n+1-bit PIPO left-shift register) holds the signed partial remainder.
// Each quotient bit takes a SHIFT clock (A:Q move left by one, Q takes the
// previous quotient bit) and an ADDSUB clock (A <= A -/+ M). The bit that
// enters Q[0] on a shift is the complement of A's sign, and it doubles as
// the add/subtract control of the next step: 1 means subtract.
//
// Datapath (combinational, between the registers):
//   - a BHPF gate makes three copies of the control Q[0];
//   - a Double Feynman gate per divisor bit makes M[i] and ~M[i];
//   - the n-bit Fredkin multiplexer picks M or ~M; the top operand bit is
//     the control itself (M is zero-extended), and the control is also the
//     carry in, so the (n+1)-bit TMB1 adder yields A + M or A - M;
//   - a row of N1 gates forces A's parallel input to zero in the start
//     cycle;
//   - the (n+1)-bit Fredkin multiplexer gives the remainder: A when A >= 0,
//     else the adder output, which at that point is A + M (the final
//     correction step of non-restoring division, done without a clock).
//
// Interface: START is sampled at a rising edge while BUSY is low; DIVIDEND
// and DIVISOR must be stable from then until the next falling edge (the
// divisor latch closes when START is accepted). DONE rises 2n+2 rising edges
// after the accepting one and QUOTIENT/REMAINDER stay valid until the next
// START. A zero divisor gives quotient 2^n-1 and remainder = dividend.
// The register, shift-register, adder and multiplexer structure follows the
// source; the sequencer, the register timing and which gate serves which
// fan-out are this design's choices.
module pp_nr_divider
  import pp_div_pkg::*;
#(
  parameter int unsigned N = DIV_N
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] dividend,
  input  logic [N-1:0] divisor,
  output logic [N-1:0] quotient,
  output logic [N-1:0] remainder,
  output logic         busy,
  output logic         done
);
  lsr_mode_t a_mode, q_mode;
  logic      m_load, a_clear;

  logic [N-1:0] m_q, q_q;
  logic [N:0]   a_q;

  // ---- sequencer ----
  div_control #(.N(N)) u_ctrl (
    .clk, .rst_n, .start,
    .m_load, .a_clear, .a_mode, .q_mode, .busy, .done
  );

  // ---- divisor register ----
  pp_register #(.W(N)) u_mreg (.e(m_load), .d(divisor), .q(m_q));

  // ---- add/subtract control fan-out ----
  logic ctrl_mux, ctrl_cin, ctrl_msb, bh_g;
  bhpf_gate u_ctrl_fan (.a(1'b0), .b(q_q[0]), .c(1'b0), .d(1'b0),
                        .p(bh_g), .q(ctrl_mux), .r(ctrl_cin), .s(ctrl_msb));

  // ---- divisor copy and complement ----
  logic [N-1:0] m_true, m_comp, m_pass;
  for (genvar i = 0; i < N; i++) begin : g_mfan
    dfg_gate u_dfg (.a(m_q[i]), .b(1'b0), .c(1'b1),
                    .p(m_pass[i]), .q(m_true[i]), .r(m_comp[i]));
  end

  // ---- operand select: M (add) or ~M (subtract) ----
  logic [N-1:0] op, op_g;
  logic         op_sel_o;
  frg_mux #(.W(N)) u_opmux (.sel(ctrl_mux), .d0(m_true), .d1(m_comp),
                            .y(op), .g(op_g), .sel_o(op_sel_o));

  // ---- (n+1)-bit adder ----
  logic [N:0] sum;
  logic       cout;
  tmb1_adder #(.W(N + 1)) u_add (.x(a_q), .y({ctrl_msb, op}), .cin(ctrl_cin),
                                 .sum(sum), .cout(cout));

  // ---- accumulator parallel input: zero at start, adder result otherwise ----
  logic [N:0]   a_din, clr_g1, clr_g2;
  logic [N+1:0] clr_ch;
  assign clr_ch[0] = a_clear;
  for (genvar i = 0; i <= N; i++) begin : g_clr
    n1_gate u_n1 (.a(sum[i]), .b(1'b0), .c(1'b0), .d(clr_ch[i]),
                  .p(a_din[i]), .q(clr_g1[i]), .r(clr_g2[i]), .s(clr_ch[i+1]));
  end

  // ---- accumulator A and quotient Q shift registers ----
  pipo_lsr #(.W(N + 1)) u_areg (.clk, .mode(a_mode), .sin(q_q[N-1]),
                                .d(a_din), .q(a_q));
  pipo_lsr #(.W(N))     u_qreg (.clk, .mode(q_mode), .sin(~a_q[N]),
                                .d(dividend), .q(q_q));

  // ---- remainder correction ----
  logic [N:0] rem_full, rem_g;
  logic       rem_sel_o;
  frg_mux #(.W(N + 1)) u_remmux (.sel(a_q[N]), .d0(a_q), .d1(sum),
                                 .y(rem_full), .g(rem_g), .sel_o(rem_sel_o));

  assign quotient  = q_q;
  assign remainder = rem_full[N-1:0];
endmodule
