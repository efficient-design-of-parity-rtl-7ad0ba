// tb_tmb1_adder: checks the TMB1 ripple adder: exhaustively at width 4 and
// with random operands at the divider's width n+1, against integer addition.
module tb_tmb1_adder;
  localparam int unsigned W = pp_div_pkg::DIV_N + 1;
  logic [3:0]   sx, sy, ss;
  logic         scin, scout;
  logic [W-1:0] x, y, s;
  logic         cin, cout;
  int checks = 0, failures = 0;

  tmb1_adder #(.W(4)) u_small (.x(sx), .y(sy), .cin(scin), .sum(ss), .cout(scout));
  tmb1_adder          u_full  (.x, .y, .cin, .sum(s), .cout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 512; i++) begin
      {scin, sx, sy} = 9'(i);
      #1;
      checks++;
      if ({scout, ss} != 5'(int'(sx) + int'(sy) + int'(scin))) begin
        failures++;
        $display("FAIL %0d+%0d+%0d = %0d", sx, sy, scin, {scout, ss});
      end
    end
    for (int i = 0; i < 2000; i++) begin
      x = W'($urandom); y = W'($urandom); cin = 1'($urandom_range(0, 1));
      #1;
      checks++;
      if ({cout, s} != (W+1)'(longint'(x) + longint'(y) + longint'(cin))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
