// Even-dot prefix cell, used in the even-numbered stages of the carry network.
//
// It is the parallel-prefix carry operator written for true-polarity
// inputs: both operand pairs arrive as (G, Kbar) (group generate, inverted
// group kill, i.e. group transmit) and the result leaves complemented as
// (Gbar, K):
//   gn = ~(g_hi | (kn_hi & g_lo))      (AOI21)
//   k  = ~(kn_hi & kn_lo)              (NAND2)
// An even stage feeds an odd stage, which expects complemented inputs.
// "hi" is the more significant span. Purely combinational.
module even_dot (
  input  logic g_hi,
  input  logic kn_hi,
  input  logic g_lo,
  input  logic kn_lo,
  output logic gn,
  output logic k
);

  always_comb begin
    gn = ~(g_hi | (kn_hi & g_lo));
    k  = ~(kn_hi & kn_lo);
  end

endmodule
