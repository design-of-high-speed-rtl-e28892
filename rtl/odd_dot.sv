// Odd-dot prefix cell, used in the odd-numbered stages of the carry network.
//
// It is the parallel-prefix carry operator written for complemented inputs:
// both operand pairs arrive as (Gbar, K) (inverted group generate, group
// kill) and the result leaves in true polarity as (G, Kbar):
//   g  = ~(gn_hi & (k_hi | gn_lo))     = G_hi | (~K_hi & G_lo)   (OAI21)
//   kn = ~(k_hi | k_lo)                = ~K_hi & ~K_lo           (NOR2)
// Because an odd stage feeds an even stage, which expects true polarity,
// no inverters are needed between them. "hi" is the more significant span.
// Purely combinational.
module odd_dot (
  input  logic gn_hi,
  input  logic k_hi,
  input  logic gn_lo,
  input  logic k_lo,
  output logic g,
  output logic kn
);

  always_comb begin
    g  = ~(gn_hi & (k_hi | gn_lo));
    kn = ~(k_hi | k_lo);
  end

endmodule
