// tb_d_latch: checks the D-latch: transparent while E=1 (Q follows every
// change of D), holding while E=0 (changes of D are ignored), over a random
// sequence compared with a reference value kept in the testbench.
module tb_d_latch;
  logic e, d, q;
  logic ref_q;
  int checks = 0, failures = 0;
  int n_transp = 0, n_hold = 0;

  d_latch dut (.e, .d, .q);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    e = 1'b1; d = 1'b0; #1;
    ref_q = 1'b0;
    for (int i = 0; i < 400; i++) begin
      e = 1'($urandom_range(0, 1));
      #1;
      d = 1'($urandom_range(0, 1));
      #1;
      if (e) begin ref_q = d; n_transp++; end
      else n_hold++;
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL step %0d e=%b d=%b q=%b exp=%b", i, e, d, q, ref_q);
      end
    end
    checks++;
    if (n_transp == 0 || n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
