// tb_div_control: checks the sequencer's schedule cycle by cycle at the
// default width: on an accepted START the registers are told load/load and
// the divisor latch opens, then n times shift/shift followed by load/hold,
// then hold/shift, then DONE with both registers holding. DONE must come
// 2n+2 rising edges after the accepting edge, and START while BUSY must be
// ignored (no latch enable, no change of schedule).
module tb_div_control;
  import pp_div_pkg::*;
  localparam int unsigned N = DIV_N;
  logic      clk = 1'b0, rst_n, start;
  logic      m_load, a_clear, busy, done;
  lsr_mode_t a_mode, q_mode;
  int checks = 0, failures = 0;
  int n_ignored = 0;

  div_control dut (.clk, .rst_n, .start, .m_load, .a_clear, .a_mode, .q_mode,
                   .busy, .done);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_modes(input lsr_mode_t ea, input lsr_mode_t eq,
                              input logic eb, input string what);
    checks++;
    if (a_mode !== ea || q_mode !== eq || busy !== eb || m_load !== 1'b0) begin
      failures++;
      $display("FAIL %s: a=%b q=%b busy=%b m_load=%b", what, a_mode, q_mode, busy, m_load);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    checks++;
    if (busy || done) failures++;
    for (int op = 0; op < 20; op++) begin
      int cycles;
      logic hold_start;
      hold_start = 1'(op & 1);
      start = 1'b1;
      #1;
      checks++;
      if (a_mode !== MODE_LOAD || q_mode !== MODE_LOAD || !m_load || !a_clear)
        failures++;
      @(negedge clk);
      start = hold_start;    // keep START high during the division half the time
      #1;
      cycles = 1;
      for (int k = 0; k < N; k++) begin
        expect_modes(MODE_SHIFT, MODE_SHIFT, 1'b1, "shift");
        if (hold_start) n_ignored++;
        @(negedge clk); #1; cycles++;
        expect_modes(MODE_LOAD, MODE_HOLD, 1'b1, "addsub");
        @(negedge clk); #1; cycles++;
      end
      expect_modes(MODE_HOLD, MODE_SHIFT, 1'b1, "lastq");
      checks++;
      if (done) failures++;
      start = 1'b0;
      @(negedge clk); #1; cycles++;
      checks++;
      if (!done || busy || cycles != 2 * N + 2) begin
        failures++;
        $display("FAIL done=%b busy=%b cycles=%0d", done, busy, cycles);
      end
      expect_modes(MODE_HOLD, MODE_HOLD, 1'b0, "idle");
      repeat (op % 3) @(negedge clk);
      checks++;
      if (!done) failures++;
    end
    checks++;
    if (n_ignored == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
