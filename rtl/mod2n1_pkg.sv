// Shared constants and types of the sparse-4 diminished-1 modulo 2^n+1 adder.
//
// The adder works on n = 16 bit number parts, split into four 4-bit
// carry-select groups (sparse-4: the carry network only produces the
// carries at group boundaries). A diminished-1 operand is a zero-indication
// bit plus an n-bit number part holding the value minus one; the value zero
// is encoded as zero bit 1 with an all-zero number part.
package mod2n1_pkg;

  // Width of the number part. The carry network is built for this size.
  localparam int unsigned N      = 16;
  // Width of one carry-select block (the sparseness of the carry network).
  localparam int unsigned GROUP  = 4;
  localparam int unsigned NGROUP = N / GROUP;

  // A diminished-1 residue modulo 2^N+1.
  typedef struct packed {
    logic         z;    // zero indication: 1 when the value is 0
    logic [N-1:0] num;  // number part: value - 1, all zeros when z = 1
  } dim1_t;

endpackage
