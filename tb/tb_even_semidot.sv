// Self-checking testbench for even_semidot: all 8 input combinations in true
// polarity; the cell must return the inverted carry ~(G_hi | T_hi & C_lo).
module tb_even_semidot;
  logic g_hi, kn_hi, g_lo, cn;
  int checks = 0, failures = 0;

  even_semidot dut (.g_hi(g_hi), .kn_hi(kn_hi), .g_lo(g_lo), .cn(cn));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {g_hi, kn_hi, g_lo} = v[2:0];
      #1;
      checks++;
      if (cn !== ~(g_hi | (kn_hi & g_lo))) begin
        failures++;
        $display("even_semidot mismatch v=%0d cn=%b", v, cn);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
