// Self-checking testbench for dim1_zero_select: drives the four zero-bit
// combinations with random number parts and an arbitrary stand-in for the
// IEAC sum, plus half-sum vectors that are all ones, and checks the selected
// number part and zero bit against the case table of the diminished-1 rules.
module tb_dim1_zero_select;
  localparam int W = 16;
  logic         az, bz, sz;
  logic [W-1:0] a, b, h, s_ieac, s;
  int checks = 0, failures = 0;

  dim1_zero_select #(.W(W)) dut (.az(az), .bz(bz), .a(a), .b(b), .h(h), .s_ieac(s_ieac), .sz(sz), .s(s));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic         esz;
      logic [W-1:0] es;
      az = n[0]; bz = n[1];
      a = W'($urandom); b = W'($urandom); s_ieac = W'($urandom);
      h = (n % 8 < 4) ? a ^ b : '1;
      #1;
      if (az && bz)       begin esz = 1'b1; es = '0; end
      else if (az)        begin esz = 1'b0; es = b;  end
      else if (bz)        begin esz = 1'b0; es = a;  end
      else                begin esz = (h == '1); es = s_ieac; end
      checks++;
      if (sz !== esz || s !== es) begin
        failures++;
        $display("zero_select mismatch az=%b bz=%b sz=%b/%b s=%h/%h", az, bz, sz, esz, s, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
