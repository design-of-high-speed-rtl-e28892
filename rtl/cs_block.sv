// 4-bit carry-select (CS) sum block.
//
// From the preprocessed half sums h and the complemented generate/kill
// pairs (gn, k) of its four bits, the block forms two sets of sum bits, one
// for an incoming carry of 0 and one for 1, using a short in-block carry
// chain:
//   c0(i) = G(i-1:0)            s0(i) = h(i) ^ c0(i)
//   c1(i) = G(i-1:0) | T(i-1:0) s1(i) = h(i) ^ c1(i)
// The group carry from the sparse carry network then picks one set, so the
// late-arriving carry passes through a multiplexer only. The network hands
// some carries over inverted; CIN_ACTIVE_LOW = 1 makes the block read cin
// as an inverted carry, which costs nothing (the multiplexer inputs swap).
// Two sum sets selected by the carry follow the design; the in-block chain
// is this implementation's choice. The generate and kill of the top bit
// are not read: only the carry network needs the block's carry out.
// Purely combinational.
module cs_block #(
  parameter int unsigned W              = 4,
  parameter bit          CIN_ACTIVE_LOW = 1'b0
) (
  input  logic [W-1:0] h,     // half sums
  input  logic [W-1:0] gn,    // inverted bit generates
  input  logic [W-1:0] k,     // bit kills
  input  logic         cin,   // group carry (inverted if CIN_ACTIVE_LOW)
  output logic [W-1:0] s
);

  logic [W-1:0] c0, c1;       // carry into each bit for block carry 0 / 1
  logic [W-1:0] s0, s1;
  logic         sel1;

  assign c0[0] = 1'b0;
  assign c1[0] = 1'b1;
  for (genvar i = 1; i < W; i++) begin : g_chain
    assign c0[i] = ~gn[i-1] | (~k[i-1] & c0[i-1]);
    assign c1[i] = ~gn[i-1] | (~k[i-1] & c1[i-1]);
  end

  always_comb begin
    s0   = h ^ c0;
    s1   = h ^ c1;
    sel1 = CIN_ACTIVE_LOW ? ~cin : cin;
    s    = sel1 ? s1 : s0;
  end

endmodule
