// Sparse-4 diminished-1 modulo 2^16+1 adder (top level).
//
// Adds two residues modulo 2^16+1 given in diminished-1 form (zero bit plus
// 16-bit number part holding value-1) and returns the sum in the same form.
// The datapath has five stages of logic:
//   stage 0      dim1_preprocess: per-bit NAND, NOR and XOR of A*, B*
//   stages 1-4   sparse4_ieac_carry: alternating odd/even dot and semi-dot
//                cells compute the inverted-end-around carries into the
//                four 4-bit groups
//   then         four cs_block instances select precomputed sum nibbles
//                with those carries
//   and          dim1_zero_select handles zero operands and sets the
//                result's zero bit.
// Interface: plain combinational ports, no clock; the whole addition
// settles in one path through the stages above. The zero bits az, bz, sz
// are this implementation's way of bringing the diminished-1 zero
// indication out; a 16-bit-only variant would tie az and bz low.
module sparse4_mod2n1_adder
  import mod2n1_pkg::*;
(
  input  logic         az,   // A is zero
  input  logic [N-1:0] a,    // number part A* = A - 1
  input  logic         bz,   // B is zero
  input  logic [N-1:0] b,    // number part B* = B - 1
  output logic         sz,   // sum is zero
  output logic [N-1:0] s     // number part of the sum, S* = (A+B mod 2^16+1) - 1
);

  logic [N-1:0]      gn, k, h;
  logic              carry0;
  logic [NGROUP-1:1] carry_n;
  logic [N-1:0]      s_ieac;

  dim1_preprocess #(.W(N)) u_pre (.a(a), .b(b), .gn(gn), .k(k), .h(h));

  sparse4_ieac_carry u_carry (.gn(gn), .k(k), .carry0(carry0), .carry_n(carry_n));

  cs_block #(.W(GROUP), .CIN_ACTIVE_LOW(1'b0)) u_cs0 (
    .h(h[GROUP-1:0]), .gn(gn[GROUP-1:0]), .k(k[GROUP-1:0]),
    .cin(carry0), .s(s_ieac[GROUP-1:0])
  );

  for (genvar j = 1; j < NGROUP; j++) begin : g_cs
    cs_block #(.W(GROUP), .CIN_ACTIVE_LOW(1'b1)) u_cs (
      .h(h[j*GROUP +: GROUP]), .gn(gn[j*GROUP +: GROUP]), .k(k[j*GROUP +: GROUP]),
      .cin(carry_n[j]), .s(s_ieac[j*GROUP +: GROUP])
    );
  end

  dim1_zero_select #(.W(N)) u_zero (
    .az(az), .bz(bz), .a(a), .b(b), .h(h), .s_ieac(s_ieac),
    .sz(sz), .s(s)
  );

endmodule
