// tb_n1_gate: exhaustive check of the N1 block against its 16-row truth
// table ({A,B,C,D} -> {P,Q,R,S}); the last three rows carry the
// parity-consistent values 0111, 1000, 1001. Also checks permutation and
// parity preservation.
module tb_n1_gate;
  logic a, b, c, d, p, q, r, s;
  int checks = 0, failures = 0;
  logic [3:0] tt [16] = '{4'b0000, 4'b0001, 4'b0010, 4'b1111,
                          4'b0100, 4'b0101, 4'b0110, 4'b1011,
                          4'b1110, 4'b0011, 4'b1100, 4'b1101,
                          4'b1010, 4'b0111, 4'b1000, 4'b1001};
  logic [15:0] seen = '0;

  n1_gate dut (.a, .b, .c, .d, .p, .q, .r, .s);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = 4'(i);
      #1;
      checks++;
      if ({p, q, r, s} !== tt[i]) begin
        failures++;
        $display("FAIL in=%04b out=%04b exp=%04b", 4'(i), {p, q, r, s}, tt[i]);
      end
      checks++;
      if (^{a, b, c, d} != ^{p, q, r, s}) failures++;
      seen[{p, q, r, s}] = 1'b1;
    end
    checks++;
    if (seen != 16'hffff) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
