// frg_mux: W-bit 2:1 multiplexer made of a row of W Fredkin gates.
//
// Gate i gets the select on its control input A, D0[i] on B and D1[i] on C,
// so its Q output is SEL ? D1[i] : D0[i]; R (the unselected bit) is a
// garbage output. The select is passed from gate to gate through the
// pass-through output P, so the row needs no fan-out gates and no constant
// inputs. Purely combinational. The divider uses one n-bit instance to pick
// the divisor or its complement and one (n+1)-bit instance to pick the
// final remainder.
module frg_mux #(
  parameter int unsigned W = pp_div_pkg::DIV_N
) (
  input  logic         sel,
  input  logic [W-1:0] d0,
  input  logic [W-1:0] d1,
  output logic [W-1:0] y,
  output logic [W-1:0] g,      // unselected inputs
  output logic         sel_o   // select after the last gate
);
  logic [W:0] s;
  assign s[0]  = sel;
  assign sel_o = s[W];
  for (genvar i = 0; i < W; i++) begin : g_bit
    frg_gate u_frg (.a(s[i]), .b(d0[i]), .c(d1[i]),
                    .p(s[i+1]), .q(y[i]), .r(g[i]));
  end
endmodule
