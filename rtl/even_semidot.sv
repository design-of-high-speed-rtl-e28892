// Even semi-dot cell: the generate half of the even-dot cell.
//
// Used in the last stage of the carry network. The more significant span
// arrives in true polarity as (G, Kbar), the less significant one only as a
// generate (or carry) g_lo. The output is the complemented carry:
//   cn = ~(g_hi | (kn_hi & g_lo))    (AOI21)
// Purely combinational.
module even_semidot (
  input  logic g_hi,
  input  logic kn_hi,
  input  logic g_lo,
  output logic cn
);

  always_comb cn = ~(g_hi | (kn_hi & g_lo));

endmodule
