// Self-checking testbench for cs_block: for both settings of CIN_ACTIVE_LOW
// it applies every 4-bit operand pair with both carry values and compares
// the sum with (a + b + carry) mod 16.
module tb_cs_block;
  logic [3:0] a, b, h, gn, k, s_hi, s_lo;
  logic       cin_hi, cin_lo;
  int checks = 0, failures = 0;

  // carry given in true polarity
  cs_block #(.W(4), .CIN_ACTIVE_LOW(1'b0)) dut_hi (.h(h), .gn(gn), .k(k), .cin(cin_hi), .s(s_hi));
  // carry given inverted
  cs_block #(.W(4), .CIN_ACTIVE_LOW(1'b1)) dut_lo (.h(h), .gn(gn), .k(k), .cin(cin_lo), .s(s_lo));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 512; v++) begin
      logic [3:0] exp_s;
      logic       c;
      {c, a, b} = v[8:0];
      h = a ^ b; gn = ~(a & b); k = ~(a | b);
      cin_hi = c; cin_lo = ~c;
      #1;
      exp_s = 4'(int'(a) + int'(b) + int'(c));
      checks += 2;
      if (s_hi !== exp_s) begin
        failures++;
        $display("cs_block mismatch a=%h b=%h c=%b s=%h exp %h", a, b, c, s_hi, exp_s);
      end
      if (s_lo !== exp_s) begin
        failures++;
        $display("cs_block (inverted carry) mismatch a=%h b=%h c=%b s=%h exp %h", a, b, c, s_lo, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
