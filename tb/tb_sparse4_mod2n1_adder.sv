// End-to-end testbench for sparse4_mod2n1_adder at its default size
// (16-bit number parts, modulus 65537). Operands are drawn as true values
// 0..65536 and encoded to diminished-1; the expected sum is
// (A + B) mod 65537 computed with integers and encoded back. Every case of
// the diminished-1 rules is counted and must occur: both operands non-zero
// with and without a carry out of the 16-bit addition (the end-around
// increment taken or not), a zero sum of two non-zero operands, exactly one
// zero operand (either side) and two zero operands.
module tb_sparse4_mod2n1_adder;
  import mod2n1_pkg::*;
  localparam int unsigned MOD = (1 << N) + 1;

  dim1_t opa, opb, res;
  int checks = 0, failures = 0;
  int n_cout = 0, n_incr = 0, n_zero_res = 0, n_az = 0, n_bz = 0, n_both = 0;

  sparse4_mod2n1_adder dut (
    .az(opa.z), .a(opa.num), .bz(opb.z), .b(opb.num),
    .sz(res.z), .s(res.num)
  );

  function automatic dim1_t encode(int unsigned v);
    dim1_t d;
    d.z   = (v == 0);
    d.num = (v == 0) ? '0 : N'(v - 1);
    return d;
  endfunction

  task automatic apply(int unsigned va, int unsigned vb);
    dim1_t exp_r;
    int unsigned sum;
    opa = encode(va);
    opb = encode(vb);
    #1;
    exp_r = encode((va + vb) % MOD);
    if (va != 0 && vb != 0) begin
      sum = int'(opa.num) + int'(opb.num);
      if (sum == (1 << N) - 1) n_zero_res++;
      else if ((sum >> N) != 0) n_cout++;
      else n_incr++;
    end else if (va == 0 && vb == 0) n_both++;
    else if (va == 0) n_az++;
    else n_bz++;
    checks++;
    if (res !== exp_r) begin
      failures++;
      if (failures < 10)
        $display("mismatch A=%0d B=%0d got z=%b num=%h exp z=%b num=%h",
                 va, vb, res.z, res.num, exp_r.z, exp_r.num);
    end
  endtask

  initial begin : watchdog
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // corner values
    automatic int unsigned corner[8] = '{0, 1, 2, 32768, 32769, 65535, 65536, 4096};
    foreach (corner[i]) foreach (corner[j]) apply(corner[i], corner[j]);
    // additive inverses: the sum is zero
    for (int n = 0; n < 2000; n++) begin
      automatic int unsigned v = $urandom_range(MOD - 1, 1);
      apply(v, MOD - v);
    end
    // every A against a fixed set of B, and the reverse
    for (int unsigned v = 0; v < MOD; v++) begin
      apply(v, 1);
      apply(65536, v);
      apply(v, 0);
      apply(0, v);
    end
    // random pairs
    for (int n = 0; n < 300000; n++) apply($urandom_range(MOD - 1, 0), $urandom_range(MOD - 1, 0));
    $display("cases: carry_out=%0d end_around_increment=%0d zero_result=%0d a_zero=%0d b_zero=%0d both_zero=%0d",
             n_cout, n_incr, n_zero_res, n_az, n_bz, n_both);
    if (n_cout == 0 || n_incr == 0 || n_zero_res == 0 || n_az == 0 || n_bz == 0 || n_both == 0) begin
      failures++;
      $display("a diminished-1 case never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
