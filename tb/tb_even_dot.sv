// Self-checking testbench for even_dot: applies all 16 input combinations in
// true polarity (G, T = Kbar) and expects the complemented result of the
// prefix operator, (~(G_hi | T_hi & G_lo), ~(T_hi & T_lo)).
module tb_even_dot;
  logic g_hi, kn_hi, g_lo, kn_lo, gn, k;
  int checks = 0, failures = 0;

  even_dot dut (.g_hi(g_hi), .kn_hi(kn_hi), .g_lo(g_lo), .kn_lo(kn_lo), .gn(gn), .k(k));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic G, T;
    for (int v = 0; v < 16; v++) begin
      {g_hi, kn_hi, g_lo, kn_lo} = v[3:0];
      #1;
      G = g_hi | (kn_hi & g_lo);
      T = kn_hi & kn_lo;
      checks++;
      if (gn !== ~G || k !== ~T) begin
        failures++;
        $display("even_dot mismatch v=%0d gn=%b k=%b", v, gn, k);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
