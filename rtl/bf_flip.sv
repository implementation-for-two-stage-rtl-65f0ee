// bf_flip: one bit-flipping step on a hard-decision codeword.
//
// y = S . H (mod 2): bit j of y is the XOR of the syndrome bits of the
// checks that cover code bit j. The flip rule compares each bit of y with
// its neighbour one position higher (the "previous" bit when the vector is
// written from bit N-1 down to bit 0): code bit j, j < N-1, is flipped when
// y[j] >= y[j+1]. Bit N-1 has no previous bit and is never flipped. This
// reproduces all four flip steps of the case study, e.g. r = 100011,
// S = 110 gives y = 110101 and r' = 110110. Combinational.
module bf_flip
  import ldpc_pkg::*;
#(
  parameter int unsigned NB = ldpc_pkg::N,
  parameter int unsigned MB = ldpc_pkg::M,
  parameter logic [MB-1:0][NB-1:0] HM = ldpc_pkg::H_DEFAULT
) (
  input  logic [NB-1:0] r,       // current codeword
  input  logic [MB-1:0] s,       // its syndrome
  output logic [NB-1:0] y,       // unsatisfied parity check vector
  output logic [NB-1:0] flip,    // bits to invert
  output logic [NB-1:0] r_next   // r with those bits inverted
);
  always_comb begin
    y = '0;
    for (int i = 0; i < MB; i++)
      if (s[i]) y = y ^ HM[i];
    flip = '0;
    for (int j = 0; j < NB - 1; j++)
      flip[j] = (y[j] >= y[j+1]);
    r_next = r ^ flip;
  end
endmodule
