// tb_pp_nr_divider_sizes: runs the divider at widths n = 1 to 5 (n = 1 is
// the size at which gate delays of the divider and its parts are usually
// quoted) and divides every operand pair at each width, comparing with
// integer division (divisor 0: quotient all ones, remainder = dividend) and
// checking the 2n+2-clock latency.
module tb_pp_nr_divider_sizes;
  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int fin = 0;

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
  end

  for (genvar n = 1; n <= 5; n++) begin : g_size
    logic         start = 1'b0, busy, done;
    logic [n-1:0] x, y, qo, ro;

    pp_nr_divider #(.N(n)) dut (.clk, .rst_n, .start, .dividend(x), .divisor(y),
                                .quotient(qo), .remainder(ro), .busy, .done);

    initial begin
      x = '0; y = '0;
      wait (rst_n);
      @(negedge clk);
      for (int b = 0; b < (1 << n); b++) begin
        for (int a = 0; a < (1 << n); a++) begin
          int cycles;
          logic [n-1:0] eq, er;
          x = n'(a); y = n'(b); start = 1'b1;
          @(negedge clk);
          start = 1'b0;
          cycles = 1;
          while (!done && cycles < 4 * n + 10) begin
            @(negedge clk);
            cycles++;
          end
          eq = (b == 0) ? '1 : n'(a / b);
          er = (b == 0) ? n'(a) : n'(a % b);
          checks++;
          if (qo !== eq || ro !== er || cycles != 2 * n + 2) begin
            failures++;
            $display("FAIL n=%0d %0d/%0d: q=%0d r=%0d cycles=%0d", n, a, b, qo, ro, cycles);
          end
        end
      end
      fin++;
    end
  end

  initial begin
    wait (fin == 5);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
