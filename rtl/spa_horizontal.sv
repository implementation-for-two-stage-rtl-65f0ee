// spa_horizontal: the horizontal (parity check node) step of the sum-product
// algorithm, for all edges of the Tanner graph at once.
//
// For every edge (i,j), H[i][j] = 1:
//   dQ(i,j) = Q0(i,j) - Q1(i,j)
//   dR(i,j) = product of dQ(i,j') over the other bits j' of check i
//   R0(i,j) = (1 + dR(i,j)) / 2,  R1(i,j) = (1 - dR(i,j)) / 2
// with integer division truncating toward zero. These are the document's
// equations on integer probabilities; the results are not renormalised,
// and every product saturates at the message width (ldpc_pkg). A check with
// a single bit would have an empty product; it gives dR = 0 here (this
// design's choice, matching the zero the vertical step uses for the same
// case). Entries where H is 0 are 0. The document's first-iteration
// waveform shows dQ = 0 on one edge (check 1, bit 4) where the equation
// gives 60 - 3 = 57; this module follows the equation. Combinational.
module spa_horizontal
  import ldpc_pkg::*;
#(
  parameter int unsigned NB = ldpc_pkg::N,
  parameter int unsigned MB = ldpc_pkg::M,
  parameter logic [MB-1:0][NB-1:0] HM = ldpc_pkg::H_DEFAULT
) (
  input  dval_t q0 [MB][NB],   // symbol-to-check messages, state 0
  input  dval_t q1 [MB][NB],   // symbol-to-check messages, state 1
  output dval_t dq [MB][NB],
  output dval_t dr [MB][NB],
  output dval_t r0 [MB][NB],   // check-to-symbol messages, state 0
  output dval_t r1 [MB][NB]    // check-to-symbol messages, state 1
);
  always_comb begin
    for (int i = 0; i < MB; i++)
      for (int j = 0; j < NB; j++)
        dq[i][j] = HM[i][j] ? sat_sub(q0[i][j], q1[i][j]) : '0;

    for (int i = 0; i < MB; i++) begin
      for (int j = 0; j < NB; j++) begin
        dval_t acc;
        int    cnt;
        acc = dval_t'(1);
        cnt = 0;
        for (int jj = 0; jj < NB; jj++) begin
          if (jj != j && HM[i][jj]) begin
            acc = sat_mul(acc, dq[i][jj]);
            cnt++;
          end
        end
        if (!HM[i][j] || cnt == 0) acc = '0;
        dr[i][j] = acc;
        r0[i][j] = HM[i][j] ? half_one_pm(acc, 1'b0) : '0;
        r1[i][j] = HM[i][j] ? half_one_pm(acc, 1'b1) : '0;
      end
    end
  end
endmodule
