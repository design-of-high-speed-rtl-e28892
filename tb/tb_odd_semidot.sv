// Self-checking testbench for odd_semidot: all 8 input combinations; the
// cell gets (Gbar_hi, K_hi) and an inverted lower carry and must return the
// true carry G_hi | T_hi & C_lo.
module tb_odd_semidot;
  logic gn_hi, k_hi, gn_lo, c;
  int checks = 0, failures = 0;

  odd_semidot dut (.gn_hi(gn_hi), .k_hi(k_hi), .gn_lo(gn_lo), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic G_hi, T_hi, C_lo;
    for (int v = 0; v < 8; v++) begin
      {G_hi, T_hi, C_lo} = v[2:0];
      gn_hi = ~G_hi; k_hi = ~T_hi; gn_lo = ~C_lo;
      #1;
      checks++;
      if (c !== (G_hi | (T_hi & C_lo))) begin
        failures++;
        $display("odd_semidot mismatch v=%0d c=%b", v, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
