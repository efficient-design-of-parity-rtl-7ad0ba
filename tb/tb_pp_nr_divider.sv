// tb_pp_nr_divider: end-to-end test of the divider at its default width n.
// It divides every pair of n-bit operands (divisor 0 included) and compares
// quotient and remainder with integer division (divisor 0: quotient all
// ones, remainder = dividend). Every division must take 2n+2 clocks. Half of
// the divisions keep START high while busy and change the operand inputs
// after the start cycle, which must not disturb the result. It counts how
// often each mechanism occurred and fails if one never did: parallel load,
// shift, hold, subtract step, add step, final remainder correction, START
// ignored while busy, zero divisor.
module tb_pp_nr_divider;
  import pp_div_pkg::*;
  localparam int unsigned N = DIV_N;

  logic         clk = 1'b0, rst_n, start;
  logic [N-1:0] dividend, divisor, quotient, remainder;
  logic         busy, done;
  int checks = 0, failures = 0;
  longint n_load = 0, n_shift = 0, n_hold = 0, n_sub = 0, n_add = 0;
  longint n_corr = 0, n_ignored = 0, n_zero = 0;

  pp_nr_divider dut (.clk, .rst_n, .start, .dividend, .divisor,
                     .quotient, .remainder, .busy, .done);

  always #5 clk = ~clk;

  // Mechanism counters, sampled just before each rising edge.
  always @(posedge clk) if (rst_n) begin
    if (dut.a_mode == MODE_LOAD && dut.u_ctrl.state == ST_IDLE) n_load++;
    if (dut.u_ctrl.state == ST_SHIFT) n_shift++;
    if (dut.u_ctrl.state == ST_IDLE && !start) n_hold++;
    if (dut.u_ctrl.state == ST_ADDSUB) begin
      if (dut.q_q[0]) n_sub++; else n_add++;
    end
    if (busy && start) n_ignored++;
  end

  initial begin : watchdog
    repeat (2 * (2 * N + 4) * (1 << (2 * N)) + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic divide(input logic [N-1:0] x, input logic [N-1:0] y,
                        input logic disturb);
    int cycles;
    logic [N-1:0] eq, er;
    dividend = x;
    divisor  = y;
    start    = 1'b1;
    @(negedge clk);
    cycles = 1;
    start = disturb;
    if (disturb) begin
      dividend = N'($urandom);
      divisor  = N'($urandom);
    end
    while (!done && cycles < 4 * N + 10) begin
      @(negedge clk);
      cycles++;
      // drop START before the division ends, or it would start the next one
      if (cycles >= 2 * N) start = 1'b0;
    end
    start = 1'b0;
    if (y == 0) begin
      eq = '1;
      er = x;
      n_zero++;
    end else begin
      eq = x / y;
      er = x % y;
    end
    if (dut.a_q[N]) n_corr++;
    checks++;
    if (quotient !== eq || remainder !== er) begin
      failures++;
      if (failures < 10)
        $display("FAIL %0d / %0d: q=%0d r=%0d exp q=%0d r=%0d", x, y,
                 quotient, remainder, eq, er);
    end
    checks++;
    if (cycles != 2 * N + 2) begin
      failures++;
      if (failures < 10) $display("FAIL latency %0d", cycles);
    end
  endtask

  initial begin
    rst_n = 1'b0; start = 1'b0; dividend = '0; divisor = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    for (int y = 0; y < (1 << N); y++) begin
      for (int x = 0; x < (1 << N); x++) begin
        divide(N'(x), N'(y), 1'((x ^ y) & 1));
        if (((x + y) % 7) == 0) @(negedge clk);   // idle gap: registers hold
      end
    end
    $display("load=%0d shift=%0d hold=%0d sub=%0d add=%0d corr=%0d ignored=%0d zero=%0d",
             n_load, n_shift, n_hold, n_sub, n_add, n_corr, n_ignored, n_zero);
    checks++;
    if (n_load == 0 || n_shift == 0 || n_hold == 0 || n_sub == 0 || n_add == 0 ||
        n_corr == 0 || n_ignored == 0 || n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
