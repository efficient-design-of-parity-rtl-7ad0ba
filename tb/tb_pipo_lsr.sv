// tb_pipo_lsr: checks the PIPO left-shift register at width n+1 against a
// cycle-by-cycle reference: random modes from the mode table (shift,
// parallel load, hold with E=0 and with E=1), random data and serial input.
// Each mode must occur.
module tb_pipo_lsr;
  import pp_div_pkg::*;
  localparam int unsigned W = DIV_N + 1;
  logic         clk = 1'b0;
  lsr_mode_t    mode;
  logic         sin;
  logic [W-1:0] d, q, ref_q;
  int checks = 0, failures = 0;
  int n_shift = 0, n_load = 0, n_hold = 0;

  pipo_lsr #(.W(W)) dut (.clk, .mode, .sin, .d, .q);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mode = MODE_LOAD; d = '0; sin = 1'b0;
    @(negedge clk);
    ref_q = '0;
    for (int i = 0; i < 1000; i++) begin
      mode = lsr_mode_t'(2'($urandom_range(0, 3)));
      d    = W'($urandom);
      sin  = 1'($urandom_range(0, 1));
      @(posedge clk);
      if (mode.sv)     begin n_hold++;  end
      else if (mode.e) begin ref_q = d; n_load++; end
      else             begin ref_q = {ref_q[W-2:0], sin}; n_shift++; end
      @(negedge clk);
      checks++;
      if (q !== ref_q) begin
        failures++;
        $display("FAIL step %0d mode=%b q=%h exp=%h", i, mode, q, ref_q);
      end
    end
    checks++;
    if (n_shift == 0 || n_load == 0 || n_hold == 0) failures++;
    $display("shift=%0d load=%0d hold=%0d", n_shift, n_load, n_hold);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
