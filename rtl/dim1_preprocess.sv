// Stage 0 (preprocessing) of the sparse-4 modulo 2^n+1 adder.
//
// For every bit position i it forms, from the number parts A* and B*:
//   gn[i] = ~(a[i] & b[i])   inverted carry generate (NAND)
//   k[i]  = ~(a[i] | b[i])   carry kill (NOR)
//   h[i]  =   a[i] ^ b[i]    half sum
// The generate/kill pair leaves this stage in the complemented polarity
// (Gbar, K), so the first prefix stage uses the odd cells, which take
// complemented inputs. Using NOR/NAND here instead of OR/AND follows the
// transistor-saving argument of the design; which of the two polarities
// stage 0 produces is this implementation's choice, made so that the stage
// parities alternate from stage 0 on. Purely combinational.
module dim1_preprocess #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] gn,
  output logic [W-1:0] k,
  output logic [W-1:0] h
);

  always_comb begin
    gn = ~(a & b);
    k  = ~(a | b);
    h  = a ^ b;
  end

endmodule
