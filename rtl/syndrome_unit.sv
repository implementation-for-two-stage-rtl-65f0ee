// syndrome_unit: parity-check sums S = r . H^T over GF(2).
//
// Syndrome bit i is the XOR of the codeword bits that parity check h(i+1)
// covers (the ones of row i of H). A zero syndrome means every check is
// satisfied and decoding can stop. Purely combinational; the SPA stage, the
// BF stage and the BF flip rule all use it.
module syndrome_unit
  import ldpc_pkg::*;
#(
  parameter int unsigned NB = ldpc_pkg::N,
  parameter int unsigned MB = ldpc_pkg::M,
  parameter logic [MB-1:0][NB-1:0] HM = ldpc_pkg::H_DEFAULT
) (
  input  logic [NB-1:0] r,      // hard-decision codeword
  output logic [MB-1:0] s,      // syndrome, bit i = check i
  output logic          zero    // all checks satisfied
);
  always_comb begin
    for (int i = 0; i < MB; i++) s[i] = ^(r & HM[i]);
    zero = (s == '0);
  end
endmodule
