// pp_dff: rising-edge storage bit made of two d_latch cells in master-slave
// arrangement.
//
// The master latch is open while CLK is low and the slave while CLK is high,
// so Q takes the value D had just before the rising edge of CLK and holds it
// for the whole cycle. The shift registers of the divider use this cell
// instead of a single latch so that a left shift moves every bit by exactly
// one place per clock (a single transparent latch per bit would let a bit
// run through the whole chain while the enable is high). This pairing is a
// choice of this design; the cost figures of the source count one latch per
// bit. No reset.
// A lint tool models each latch as combinational logic and may report a
// combinational loop from Q back to D through the logic around this cell
// (for example the hold path of a shift register). The loop is never open:
// the master and the slave are never transparent at the same time.
module pp_dff (
  input  logic clk,
  input  logic d,
  output logic q
);
  logic clk_n;
  logic m;

  assign clk_n = ~clk;

  d_latch u_master (.e(clk_n), .d(d), .q(m));
  d_latch u_slave  (.e(clk),   .d(m), .q(q));
endmodule
