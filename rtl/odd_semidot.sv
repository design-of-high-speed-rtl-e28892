// Odd semi-dot cell: the generate half of the odd-dot cell.
//
// Used where only a carry is needed, not a group kill. The more significant
// span arrives complemented as (Gbar, K), the less significant one only as
// its inverted generate (or inverted carry) gn_lo. The output is a carry in
// true polarity:
//   c = ~(gn_hi & (k_hi | gn_lo)) = G_hi | (~K_hi & ~gn_lo)   (OAI21)
// Purely combinational.
module odd_semidot (
  input  logic gn_hi,
  input  logic k_hi,
  input  logic gn_lo,
  output logic c
);

  always_comb c = ~(gn_hi & (k_hi | gn_lo));

endmodule
