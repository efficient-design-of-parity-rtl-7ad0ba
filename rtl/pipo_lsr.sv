// pipo_lsr: W-bit parallel-in parallel-out left-shift register built from
// Fredkin gates, Double Feynman gates and D-latch storage.
//
// Each bit i has two Fredkin gates in series and one storage bit:
//   FRG 1 (control E):  m = E  ? I[i] : Q[i-1]    (Q[-1] is SIN)
//   FRG 2 (control SV): d = SV ? Q[i] : m
// and a Double Feynman gate with two constant-0 inputs that makes three
// copies of the stored bit: one for the output, one fed back to FRG 2 (hold)
// and one to FRG 1 of bit i+1 (shift). E and SV travel along the row through
// the Fredkin gates' pass-through outputs. Mode table:
//   SV=1 -> hold, E=1,SV=0 -> parallel load of I, E=0,SV=0 -> shift left,
// with SIN entering bit 0 and bit W-1 leaving at the top.
// Timing: the new value appears after the rising edge of CLK; the mode, I
// and SIN are sampled just before it. The storage bit is a master-slave pair
// of latches (pp_dff) so that a shift moves data by one place per clock.
// No reset: load the register before reading it.
// The hold path (stored bit -> FRG 2 -> storage) looks like a combinational
// loop to a lint tool that models latches as logic; it is broken by the
// master-slave storage, whose two latches are never open together.
module pipo_lsr
  import pp_div_pkg::*;
#(
  parameter int unsigned W = DIV_N
) (
  input  logic         clk,
  input  lsr_mode_t    mode,
  input  logic         sin,   // bit shifted into position 0
  input  logic [W-1:0] d,     // parallel input I
  output logic [W-1:0] q
);
  logic [W:0]   e_ch, sv_ch;   // mode lines passed from gate to gate
  logic [W:0]   chain;         // shift path: chain[i] feeds bit i
  logic [W-1:0] m, dn, st, fb;
  logic [W-1:0] g1, g2;        // unselected Fredkin outputs (garbage)

  assign e_ch[0]  = mode.e;
  assign sv_ch[0] = mode.sv;
  assign chain[0] = sin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    frg_gate u_frg_load (.a(e_ch[i]),  .b(chain[i]), .c(d[i]),
                         .p(e_ch[i+1]),  .q(m[i]),  .r(g1[i]));
    frg_gate u_frg_hold (.a(sv_ch[i]), .b(m[i]),     .c(fb[i]),
                         .p(sv_ch[i+1]), .q(dn[i]), .r(g2[i]));
    pp_dff   u_store    (.clk(clk), .d(dn[i]), .q(st[i]));
    dfg_gate u_fanout   (.a(st[i]), .b(1'b0), .c(1'b0),
                         .p(q[i]), .q(fb[i]), .r(chain[i+1]));
  end
endmodule
