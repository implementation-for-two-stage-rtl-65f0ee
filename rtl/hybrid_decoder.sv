// hybrid_decoder: two-stage hybrid LDPC decoder (top level).
//
// A codeword of NB received soft samples (value x 1000) is decoded in two
// stages. The samples are first mapped to integer a-priori probabilities
// (prob_mapper). Stage one runs the sum-product algorithm for a small fixed
// number of iterations, SPA_ITERS (spa_decoder). If its hard decision
// already has a zero syndrome, decoding ends there and the bit-flipping
// stage is bypassed. Otherwise the SPA hard decision is handed to stage two,
// bit flipping (bf_decoder), for the remaining BF_ITERS iterations, which
// stops early on a zero syndrome. The defaults, one SPA and two BF
// iterations on the (6,3) code, are the document's hardware case study.
//
// Interface: start (taken only while busy is low) with the samples re[];
// done pulses for one cycle with decoded[], its syndrome, success (syndrome
// zero), bf_used (stage two ran) and the iterations of each stage. The SPA
// hard decision and its syndrome stay visible on spa_decoded/spa_syndrome.
// Latency, in clock edges from the one that takes start to the one that
// raises done: 4 + 2*(SPA iterations) when stage two is bypassed, and
// 6 + 2*(SPA iterations) + (BF iterations) when it runs (one cycle to map
// the samples, the stage latencies, one cycle per hand-over and one to
// finish). With the defaults: 6 cycles, or 8 to 10 cycles. The stage sequencing follows the document's hybrid flow
// chart; the cycle timing and the handshake are this design's choice.
module hybrid_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned NB = ldpc_pkg::N,
  parameter int unsigned MB = ldpc_pkg::M,
  parameter logic [MB-1:0][NB-1:0] HM = ldpc_pkg::H_DEFAULT,
  parameter int unsigned SPA_ITERS = 1,
  parameter int unsigned BF_ITERS  = 2,
  parameter int unsigned IW = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  sample_t        re [NB],
  output logic           busy,
  output logic           done,
  output logic [NB-1:0]  decoded,
  output logic [MB-1:0]  syndrome,
  output logic           success,
  output logic           bf_used,
  output logic [IW-1:0]  spa_iterations,
  output logic [IW-1:0]  bf_iterations,
  output logic [NB-1:0]  spa_decoded,
  output logic [MB-1:0]  spa_syndrome
);
  typedef enum logic [2:0] {H_IDLE, H_MAP, H_SPA, H_BF, H_END} hstate_t;
  hstate_t state;

  sample_t re_q [NB];
  prob_t   f0_c [NB], f1_c [NB];

  logic spa_start, spa_busy, spa_done, spa_success;
  logic [NB-1:0] spa_dec;
  logic [MB-1:0] spa_syn;
  logic [IW-1:0] spa_it;

  logic bf_start, bf_busy, bf_done, bf_success;
  logic [NB-1:0] bf_dec;
  logic [MB-1:0] bf_syn;
  logic [IW-1:0] bf_it;

  prob_mapper #(.NB(NB)) u_map (
    .re(re_q), .f0(f0_c), .f1(f1_c), .interval());

  spa_decoder #(.NB(NB), .MB(MB), .HM(HM), .MAX_ITERS(SPA_ITERS), .IW(IW)) u_spa (
    .clk(clk), .rst_n(rst_n), .start(spa_start), .f0(f0_c), .f1(f1_c),
    .busy(spa_busy), .done(spa_done), .decoded(spa_dec), .syndrome(spa_syn),
    .success(spa_success), .iterations(spa_it),
    .dq_o(), .dr_o(), .r0_o(), .r1_o(), .qn0_o(), .qn1_o());

  bf_decoder #(.NB(NB), .MB(MB), .HM(HM), .MAX_ITERS(BF_ITERS), .IW(IW)) u_bf (
    .clk(clk), .rst_n(rst_n), .start(bf_start), .r_in(spa_dec),
    .busy(bf_busy), .done(bf_done), .decoded(bf_dec), .syndrome(bf_syn),
    .success(bf_success), .iterations(bf_it), .y_o());

  assign busy      = (state != H_IDLE);
  assign spa_start = (state == H_MAP);
  assign bf_start  = (state == H_SPA) && spa_done && !spa_success && (BF_ITERS != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= H_IDLE;
      done           <= 1'b0;
      decoded        <= '0;
      syndrome       <= '0;
      success        <= 1'b0;
      bf_used        <= 1'b0;
      spa_iterations <= '0;
      bf_iterations  <= '0;
      spa_decoded    <= '0;
      spa_syndrome   <= '0;
      for (int j = 0; j < NB; j++) re_q[j] <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        H_IDLE: if (start) begin
          re_q    <= re;
          bf_used <= 1'b0;
          state   <= H_MAP;
        end
        H_MAP: state <= H_SPA;          // spa_decoder loads f0/f1 now
        H_SPA: if (spa_done) begin
          spa_decoded    <= spa_dec;
          spa_syndrome   <= spa_syn;
          spa_iterations <= spa_it;
          if (spa_success || BF_ITERS == 0) begin
            // syndrome satisfied (or no BF share): bypass stage two
            decoded       <= spa_dec;
            syndrome      <= spa_syn;
            success       <= spa_success;
            bf_iterations <= '0;
            state         <= H_END;
          end else begin
            bf_used <= 1'b1;
            state   <= H_BF;
          end
        end
        H_BF: if (bf_done) begin
          decoded       <= bf_dec;
          syndrome      <= bf_syn;
          success       <= bf_success;
          bf_iterations <= bf_it;
          state         <= H_END;
        end
        H_END: begin
          done  <= 1'b1;
          state <= H_IDLE;
        end
        default: state <= H_IDLE;
      endcase
    end
  end

  // stage one and stage two never run at the same time
  assert property (@(posedge clk) disable iff (!rst_n) !(spa_busy && bf_busy));
endmodule
