// spa_vertical: the vertical (symbol node) step of the sum-product algorithm
// and the hard decision.
//
// For every code bit j, with f the a-priori probabilities:
//   Qj^x = f_j^x * product of R^x(i,j) over the checks i of bit j
//   r_j  = 1 when Qj^1 > Qj^0, else 0 (a tie decides 0)
// and, for every edge (i,j), the message for the next iteration:
//   Q^x(i,j) = f_j^x * product of R^x(i',j) over the other checks i' of j
// A bit with a single check has no other check; its updated message is 0,
// as in the case-study waveforms. Products saturate at the message width.
// Entries where H is 0 are 0. Combinational.
module spa_vertical
  import ldpc_pkg::*;
#(
  parameter int unsigned NB = ldpc_pkg::N,
  parameter int unsigned MB = ldpc_pkg::M,
  parameter logic [MB-1:0][NB-1:0] HM = ldpc_pkg::H_DEFAULT
) (
  input  prob_t        f0 [NB],      // a-priori probability of 0
  input  prob_t        f1 [NB],      // a-priori probability of 1
  input  dval_t        r0 [MB][NB],
  input  dval_t        r1 [MB][NB],
  output dval_t        qn0 [NB],     // posterior, state 0
  output dval_t        qn1 [NB],     // posterior, state 1
  output logic [NB-1:0] dec,         // hard decision
  output dval_t        qu0 [MB][NB], // updated messages, state 0
  output dval_t        qu1 [MB][NB]  // updated messages, state 1
);
  always_comb begin
    for (int j = 0; j < NB; j++) begin
      dval_t a0, a1;
      a0 = dval_t'(f0[j]);
      a1 = dval_t'(f1[j]);
      for (int i = 0; i < MB; i++) begin
        if (HM[i][j]) begin
          a0 = sat_mul(a0, r0[i][j]);
          a1 = sat_mul(a1, r1[i][j]);
        end
      end
      qn0[j] = a0;
      qn1[j] = a1;
      dec[j] = (a1 > a0);
    end

    for (int i = 0; i < MB; i++) begin
      for (int j = 0; j < NB; j++) begin
        dval_t b0, b1;
        int    cnt;
        b0 = dval_t'(f0[j]);
        b1 = dval_t'(f1[j]);
        cnt = 0;
        for (int ii = 0; ii < MB; ii++) begin
          if (ii != i && HM[ii][j]) begin
            b0 = sat_mul(b0, r0[ii][j]);
            b1 = sat_mul(b1, r1[ii][j]);
            cnt++;
          end
        end
        if (!HM[i][j] || cnt == 0) begin
          b0 = '0;
          b1 = '0;
        end
        qu0[i][j] = b0;
        qu1[i][j] = b1;
      end
    end
  end
endmodule
