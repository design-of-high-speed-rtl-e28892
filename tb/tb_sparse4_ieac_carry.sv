// Self-checking testbench for sparse4_ieac_carry. Operand pairs (random,
// plus the corner cases of an all-ones sum, carry out and no carry out) are
// preprocessed in the testbench into (Gbar, K). The expected carries come
// from integer arithmetic: the end-around carry is cin = 1 when A*+B* has no
// carry out of bit 15, and the carry into bit 4j is
// ((A* mod 2^4j) + (B* mod 2^4j) + cin) >> 4j.
module tb_sparse4_ieac_carry;
  import mod2n1_pkg::*;
  logic [N-1:0]      a, b, gn, k;
  logic              carry0;
  logic [NGROUP-1:1] carry_n;
  int checks = 0, failures = 0;
  int n_zero_sum = 0, n_cout = 0, n_nocout = 0;

  sparse4_ieac_carry dut (.gn(gn), .k(k), .carry0(carry0), .carry_n(carry_n));

  initial begin : watchdog
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 200000; n++) begin
      int unsigned sum, cin, m, cj;
      if (n % 16 == 0) begin
        // A* + B* = 2^16 - 1: every bit propagates
        a = N'($urandom); b = ~a;
      end else if (n % 16 == 1) begin
        // long propagate chains broken in one place
        a = N'($urandom); b = ~a;
        b[$urandom_range(N-1)] ^= 1'b1;
      end else begin
        a = N'($urandom); b = N'($urandom);
      end
      gn = ~(a & b);
      k  = ~(a | b);
      #1;
      sum = int'(a) + int'(b);
      cin = (sum >> N) == 0 ? 1 : 0;
      if (sum == (1 << N) - 1) n_zero_sum++;
      else if (cin == 1) n_nocout++;
      else n_cout++;
      checks++;
      if (carry0 !== cin[0]) begin
        failures++;
        $display("carry0 mismatch a=%h b=%h got %b exp %0d", a, b, carry0, cin);
      end
      for (int j = 1; j < NGROUP; j++) begin
        m  = (1 << (GROUP * j)) - 1;
        cj = ((int'(a) & m) + (int'(b) & m) + cin) >> (GROUP * j);
        checks++;
        if (carry_n[j] !== ~cj[0]) begin
          failures++;
          $display("carry %0d mismatch a=%h b=%h got ~%b exp %0d", j, a, b, carry_n[j], cj);
        end
      end
    end
    if (n_zero_sum == 0 || n_cout == 0 || n_nocout == 0) begin
      failures++;
      $display("coverage hole: zero_sum=%0d cout=%0d nocout=%0d", n_zero_sum, n_cout, n_nocout);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
