// Self-checking testbench for odd_dot: applies all 16 input combinations and
// compares with the prefix operator evaluated on the uncomplemented pairs,
// (G,T)_hi o (G,T)_lo = (G_hi | T_hi & G_lo, T_hi & T_lo), where the cell
// gets Gbar and K = ~T and must return G and T.
module tb_odd_dot;
  logic gn_hi, k_hi, gn_lo, k_lo, g, kn;
  int checks = 0, failures = 0;

  odd_dot dut (.gn_hi(gn_hi), .k_hi(k_hi), .gn_lo(gn_lo), .k_lo(k_lo), .g(g), .kn(kn));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic G_hi, T_hi, G_lo, T_lo, eg, et;
    for (int v = 0; v < 16; v++) begin
      {G_hi, T_hi, G_lo, T_lo} = v[3:0];
      gn_hi = ~G_hi; k_hi = ~T_hi; gn_lo = ~G_lo; k_lo = ~T_lo;
      #1;
      eg = G_hi | (T_hi & G_lo);
      et = T_hi & T_lo;
      checks++;
      if (g !== eg || kn !== et) begin
        failures++;
        $display("odd_dot mismatch v=%0d g=%b/%b kn=%b/%b", v, g, eg, kn, et);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
