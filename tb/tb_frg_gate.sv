// tb_frg_gate: exhaustive check of the Fredkin gate against its 8-row truth
// table ({A,B,C} -> {P,Q,R}), plus permutation and parity checks.
module tb_frg_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  logic [2:0] tt [8] = '{3'b000, 3'b001, 3'b010, 3'b011,
                         3'b100, 3'b110, 3'b101, 3'b111};
  logic [7:0] seen = '0;

  frg_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = 3'(i);
      #1;
      checks++;
      if ({p, q, r} !== tt[i]) begin
        failures++;
        $display("FAIL in=%03b out=%03b exp=%03b", 3'(i), {p, q, r}, tt[i]);
      end
      checks++;
      if (^{a, b, c} != ^{p, q, r}) failures++;
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen != 8'hff) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
