// d_latch: one-bit parity-preserving D-latch, the storage cell of the
// divider's registers.
//
// Function: while the enable E is high the output Q follows D; while E is
// low Q keeps its value. Reversible realisations build this from a Fredkin
// gate with Q fed back (Q+ = E ? D : Q) plus a fan-out gate; here only that
// logic function is written, as a level-sensitive latch. The latch is the
// intended storage element, so the latch a synthesis tool infers here is
// deliberate. The cell has no reset; whatever reads it must load it first.
module d_latch (
  input  logic e,  // enable (transparent when 1)
  input  logic d,  // data in
  output logic q   // stored bit
);
  always_latch begin
    if (e) q = d;
  end
endmodule
