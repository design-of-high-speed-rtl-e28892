// Zero-operand handling of the diminished-1 modulo 2^n+1 adder.
//
// In diminished-1 form a value A is a zero bit az and a number part
// A* = A - 1 (A* = 0 and az = 1 for A = 0). The IEAC adder handles only
// the case of two non-zero operands; the result is settled here:
//   az bz | sz          s
//   0  0  | &h          IEAC sum  (A*+B* = 2^n-1 means A+B = 2^n+1 = 0,
//         |                        the IEAC sum is then already all zeros)
//   1  0  | 0           B*        (result is the non-zero operand)
//   0  1  | 0           A*
//   1  1  | 1           0         (both zero)
// The case split follows the design; detecting a zero sum of two non-zero
// operands from the all-ones half sum is this implementation's choice.
// Purely combinational.
module dim1_zero_select #(
  parameter int unsigned W = 16
) (
  input  logic         az,
  input  logic         bz,
  input  logic [W-1:0] a,       // number part A*
  input  logic [W-1:0] b,       // number part B*
  input  logic [W-1:0] h,       // half sums a ^ b
  input  logic [W-1:0] s_ieac,  // IEAC sum of a and b
  output logic         sz,
  output logic [W-1:0] s
);

  always_comb begin
    unique case ({az, bz})
      2'b00: begin sz = &h;   s = s_ieac;  end
      2'b10: begin sz = 1'b0; s = b;       end
      2'b01: begin sz = 1'b0; s = a;       end
      default: begin sz = 1'b1; s = '0;    end
    endcase
  end

endmodule
