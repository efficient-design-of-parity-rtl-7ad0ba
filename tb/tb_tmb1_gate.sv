// tb_tmb1_gate: exhaustive check of the TMB1 block against its 32-row truth
// table ({A,B,C,D,E} -> {P,Q,R,S,T}); rows 10101 and 10110 carry the
// parity-consistent values 00010 and 00111. Also checks that the block is a
// parity-preserving permutation and that with D=E=0 it is a full adder
// (R = sum, S = carry of A, B, C).
module tb_tmb1_gate;
  logic a, b, c, d, e, p, q, r, s, t;
  int checks = 0, failures = 0;
  logic [4:0] tt [32] = '{
    5'b11000, 5'b11001, 5'b11111, 5'b11110, 5'b11100, 5'b11101, 5'b11011, 5'b11010,
    5'b10101, 5'b10100, 5'b10001, 5'b10000, 5'b10010, 5'b10011, 5'b10110, 5'b10111,
    5'b00100, 5'b00101, 5'b00000, 5'b00001, 5'b00011, 5'b00010, 5'b00111, 5'b00110,
    5'b01010, 5'b01011, 5'b01101, 5'b01100, 5'b01110, 5'b01111, 5'b01001, 5'b01000};
  logic [31:0] seen = '0;

  tmb1_gate dut (.a, .b, .c, .d, .e, .p, .q, .r, .s, .t);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      {a, b, c, d, e} = 5'(i);
      #1;
      checks++;
      if ({p, q, r, s, t} !== tt[i]) begin
        failures++;
        $display("FAIL in=%05b out=%05b exp=%05b", 5'(i), {p, q, r, s, t}, tt[i]);
      end
      checks++;
      if (^{a, b, c, d, e} != ^{p, q, r, s, t}) failures++;
      seen[{p, q, r, s, t}] = 1'b1;
      if (!d && !e) begin
        checks++;
        if ({s, r} != 2'(int'(a) + int'(b) + int'(c))) failures++;
      end
    end
    checks++;
    if (seen != 32'hffff_ffff) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
