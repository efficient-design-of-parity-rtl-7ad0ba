// tmb1_adder: W-bit ripple-carry adder made of W TMB1 blocks.
//
// Block i adds X[i], Y[i] and the carry from block i-1 with its D and E
// inputs tied to 0: its R output is SUM[i] and its S output the carry into
// block i+1. CIN enters block 0 and COUT leaves block W-1. The P, Q and T
// outputs of every block are garbage. Purely combinational, delay grows
// linearly with W. In the divider W is n+1 and CIN is the subtract control,
// so the adder computes A + M or A - M in two's complement.
module tmb1_adder #(
  parameter int unsigned W = pp_div_pkg::DIV_N + 1
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  logic [W:0]   c;
  logic [W-1:0] gp, gq, gt;   // garbage outputs
  assign c[0] = cin;
  assign cout = c[W];
  for (genvar i = 0; i < W; i++) begin : g_bit
    tmb1_gate u_cell (.a(x[i]), .b(y[i]), .c(c[i]), .d(1'b0), .e(1'b0),
                      .p(gp[i]), .q(gq[i]), .r(sum[i]), .s(c[i+1]), .t(gt[i]));
  end
endmodule
