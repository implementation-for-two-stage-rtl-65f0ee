// bf_decoder: the hard-decision (bit-flipping) stage, iterated under a small
// controller.
//
// start loads a hard-decision codeword. In every RUN cycle the syndrome of
// the current word is checked (syndrome_unit): if it is zero, or MAX_ITERS
// flip iterations are done, decoding ends; otherwise one flip step (bf_flip)
// replaces the word and the iteration count advances. So a word with a zero
// syndrome is passed on unchanged after one cycle, and each flip iteration
// costs one cycle; latency from start to done is 2 + iterations cycles.
// done pulses for one cycle with the word, its syndrome, success and the
// iterations run. The loop follows the document's BF flow chart; the cycle
// timing and the handshake are this design's choice. MAX_ITERS = 2 is the
// BF share of the hybrid decoder's case study.
module bf_decoder
  import ldpc_pkg::*;
#(
  parameter int unsigned NB = ldpc_pkg::N,
  parameter int unsigned MB = ldpc_pkg::M,
  parameter logic [MB-1:0][NB-1:0] HM = ldpc_pkg::H_DEFAULT,
  parameter int unsigned MAX_ITERS = 2,
  parameter int unsigned IW = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  input  logic [NB-1:0]  r_in,
  output logic           busy,
  output logic           done,
  output logic [NB-1:0]  decoded,
  output logic [MB-1:0]  syndrome,
  output logic           success,
  output logic [IW-1:0]  iterations,
  output logic [NB-1:0]  y_o          // y of the last flip step
);
  typedef enum logic {S_IDLE, S_RUN} state_t;
  state_t state;

  logic [NB-1:0] r_q, y_c, r_next_c;
  logic [MB-1:0] s_c;
  logic          zero_c;

  syndrome_unit #(.NB(NB), .MB(MB), .HM(HM)) u_syn (
    .r(r_q), .s(s_c), .zero(zero_c));

  bf_flip #(.NB(NB), .MB(MB), .HM(HM)) u_flip (
    .r(r_q), .s(s_c), .y(y_c), .flip(), .r_next(r_next_c));

  assign busy     = (state != S_IDLE);
  assign decoded  = r_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      done       <= 1'b0;
      r_q        <= '0;
      syndrome   <= '0;
      success    <= 1'b0;
      iterations <= '0;
      y_o        <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          r_q        <= r_in;
          iterations <= '0;
          state      <= S_RUN;
        end
        S_RUN: begin
          syndrome <= s_c;
          if (zero_c || int'(iterations) >= int'(MAX_ITERS)) begin
            success <= zero_c;
            done    <= 1'b1;
            state   <= S_IDLE;
          end else begin
            r_q        <= r_next_c;
            y_o        <= y_c;
            iterations <= iterations + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
