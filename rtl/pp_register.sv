// pp_register: W-bit parity-preserving register, W d_latch cells sharing
// one enable.
//
// While E is high the register is transparent (Q = D); when E falls it
// keeps the last value of D. In the divider it holds the divisor: E is
// raised for the cycle in which a division is started, and D must be stable
// until E has fallen. As in the source, the register is one latch per bit
// and has no reset. Default width is the divider's n.
module pp_register #(
  parameter int unsigned W = pp_div_pkg::DIV_N
) (
  input  logic         e,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    d_latch u_lat (.e(e), .d(d[i]), .q(q[i]));
  end
endmodule
