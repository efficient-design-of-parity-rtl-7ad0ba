// tb_frg_mux: checks the Fredkin multiplexer at widths n and n+1 with random
// data and both select values: Y is the selected word, G the other one and
// the select comes out unchanged.
module tb_frg_mux;
  localparam int unsigned N = pp_div_pkg::DIV_N;
  logic         sel;
  logic [N-1:0] a0, a1, ay, ag;
  logic [N:0]   b0, b1, by, bg;
  logic         asel_o, bsel_o;
  int checks = 0, failures = 0;

  frg_mux                u_n  (.sel, .d0(a0), .d1(a1), .y(ay), .g(ag), .sel_o(asel_o));
  frg_mux #(.W(N + 1))   u_n1 (.sel, .d0(b0), .d1(b1), .y(by), .g(bg), .sel_o(bsel_o));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      sel = 1'(i & 1);
      a0 = N'($urandom); a1 = N'($urandom);
      b0 = (N+1)'($urandom); b1 = (N+1)'($urandom);
      #1;
      checks++; if (ay !== (sel ? a1 : a0)) failures++;
      checks++; if (ag !== (sel ? a0 : a1)) failures++;
      checks++; if (by !== (sel ? b1 : b0)) failures++;
      checks++; if (bg !== (sel ? b0 : b1)) failures++;
      checks++; if (asel_o !== sel || bsel_o !== sel) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
