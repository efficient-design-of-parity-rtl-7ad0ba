// tb_pp_register: checks the default-width latch register: with E=1 the
// output follows the input, after E falls the last input is kept while the
// input keeps changing.
module tb_pp_register;
  localparam int unsigned W = pp_div_pkg::DIV_N;
  logic         e;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0;

  pp_register dut (.e, .d, .q);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      e = 1'b1;
      d = W'($urandom);
      #1;
      ref_q = d;
      checks++;
      if (q !== ref_q) failures++;
      e = 1'b0;
      #1;
      for (int k = 0; k < 3; k++) begin
        d = W'($urandom);
        #1;
        checks++;
        if (q !== ref_q) begin
          failures++;
          $display("FAIL hold q=%h exp=%h", q, ref_q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
