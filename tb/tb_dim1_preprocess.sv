// Self-checking testbench for dim1_preprocess: random and corner operand
// pairs; each output bit is checked against the per-bit truth table of
// NAND, NOR and XOR worked out bit by bit in the testbench.
module tb_dim1_preprocess;
  localparam int W = 16;
  logic [W-1:0] a, b, gn, k, h;
  int checks = 0, failures = 0;

  dim1_preprocess #(.W(W)) dut (.a(a), .b(b), .gn(gn), .k(k), .h(h));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      case (n)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = '0; end
        3: begin a = 16'haaaa; b = 16'h5555; end
        default: begin a = W'($urandom); b = W'($urandom); end
      endcase
      #1;
      for (int i = 0; i < W; i++) begin
        logic eg, ek, eh;
        eg = !(a[i] == 1'b1 && b[i] == 1'b1);
        ek = (a[i] == 1'b0 && b[i] == 1'b0);
        eh = (a[i] != b[i]);
        checks++;
        if (gn[i] !== eg || k[i] !== ek || h[i] !== eh) begin
          failures++;
          $display("preprocess mismatch a=%h b=%h bit %0d", a, b, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
