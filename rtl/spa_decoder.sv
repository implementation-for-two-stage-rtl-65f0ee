// spa_decoder: the soft-decision (sum-product) stage, iterated under a small
// controller.
//
// start loads the a-priori probabilities f0/f1 and initialises the
// symbol-to-check messages Q(i,j) = f_j on every edge of H. Each iteration
// then takes two clock cycles:
//   HOR: the horizontal step (spa_horizontal) is registered: dQ, dR, R0, R1.
//   VER: the vertical step (spa_vertical) gives the posteriors and the hard
//        decision, registered together with the syndrome of that decision.
//        A zero syndrome, or MAX_ITERS iterations done, ends decoding;
//        otherwise the updated messages Q(i,j) replace the old ones and the
//        next iteration starts with HOR.
// done pulses for one cycle with the decision, its syndrome, success
// (syndrome zero) and the number of iterations run. Latency from start to
// done is 1 + 2 * iterations cycles. The iteration structure follows the
// document's SPA flow chart; the cycle split and the handshake (start is
// taken only while idle) are this design's choice. MAX_ITERS = 1 is the SPA
// share of the hybrid decoder's case study.
module spa_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned NB = ldpc_pkg::N,
  parameter int unsigned MB = ldpc_pkg::M,
  parameter logic [MB-1:0][NB-1:0] HM = ldpc_pkg::H_DEFAULT,
  parameter int unsigned MAX_ITERS = 1,
  parameter int unsigned IW = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  prob_t          f0 [NB],
  input  prob_t          f1 [NB],
  output logic           busy,
  output logic           done,
  output logic [NB-1:0]  decoded,
  output logic [MB-1:0]  syndrome,
  output logic           success,
  output logic [IW-1:0]  iterations,
  // probes: the registered messages of the last step
  output dval_t          dq_o [MB][NB],
  output dval_t          dr_o [MB][NB],
  output dval_t          r0_o [MB][NB],
  output dval_t          r1_o [MB][NB],
  output dval_t          qn0_o [NB],
  output dval_t          qn1_o [NB]
);
  typedef enum logic [1:0] {S_IDLE, S_HOR, S_VER} state_t;
  state_t state;

  prob_t f0_q [NB], f1_q [NB];
  dval_t q0 [MB][NB], q1 [MB][NB];
  dval_t dq_c [MB][NB], dr_c [MB][NB], r0_c [MB][NB], r1_c [MB][NB];
  dval_t qn0_c [NB], qn1_c [NB], qu0_c [MB][NB], qu1_c [MB][NB];
  logic [NB-1:0] dec_c;
  logic [MB-1:0] syn_c;
  logic          syn_zero_c;

  spa_horizontal #(.NB(NB), .MB(MB), .HM(HM)) u_hor (
    .q0(q0), .q1(q1), .dq(dq_c), .dr(dr_c), .r0(r0_c), .r1(r1_c));

  spa_vertical #(.NB(NB), .MB(MB), .HM(HM)) u_ver (
    .f0(f0_q), .f1(f1_q), .r0(r0_o), .r1(r1_o),
    .qn0(qn0_c), .qn1(qn1_c), .dec(dec_c), .qu0(qu0_c), .qu1(qu1_c));

  syndrome_unit #(.NB(NB), .MB(MB), .HM(HM)) u_syn (
    .r(dec_c), .s(syn_c), .zero(syn_zero_c));

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      decoded    <= '0;
      syndrome   <= '0;
      success    <= 1'b0;
      iterations <= '0;
      for (int j = 0; j < NB; j++) begin
        f0_q[j]  <= '0;
        f1_q[j]  <= '0;
        qn0_o[j] <= '0;
        qn1_o[j] <= '0;
      end
      for (int i = 0; i < MB; i++)
        for (int j = 0; j < NB; j++) begin
          q0[i][j] <= '0;   q1[i][j] <= '0;
          dq_o[i][j] <= '0; dr_o[i][j] <= '0;
          r0_o[i][j] <= '0; r1_o[i][j] <= '0;
        end
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          // initialisation step: Q(i,j) = f_j on every edge
          for (int j = 0; j < NB; j++) begin
            f0_q[j] <= f0[j];
            f1_q[j] <= f1[j];
          end
          for (int i = 0; i < MB; i++)
            for (int j = 0; j < NB; j++) begin
              q0[i][j] <= HM[i][j] ? dval_t'(f0[j]) : '0;
              q1[i][j] <= HM[i][j] ? dval_t'(f1[j]) : '0;
            end
          iterations <= '0;
          state <= S_HOR;
        end
        S_HOR: begin
          dq_o <= dq_c;
          dr_o <= dr_c;
          r0_o <= r0_c;
          r1_o <= r1_c;
          state <= S_VER;
        end
        S_VER: begin
          qn0_o      <= qn0_c;
          qn1_o      <= qn1_c;
          decoded    <= dec_c;
          syndrome   <= syn_c;
          iterations <= iterations + 1'b1;
          if (syn_zero_c || (int'(iterations) + 1 >= int'(MAX_ITERS))) begin
            success <= syn_zero_c;
            done    <= 1'b1;
            state   <= S_IDLE;
          end else begin
            q0    <= qu0_c;
            q1    <= qu1_c;
            state <= S_HOR;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
