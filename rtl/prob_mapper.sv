// prob_mapper: turns the received soft samples of one codeword into integer
// a-priori probabilities f0/f1, the initialisation of the SPA stage.
//
// As the document describes, the span between the smallest and the largest
// received sample of the codeword is divided into 2^K intervals and every
// sample is mapped to the probability pair of its interval, scaled so that
// f0 + f1 = 2^K - 1 (63) instead of 1. Interval n of sample v is
//   n = floor((v - min) * 2^K / (max - min + 1)),   0 <= n < 2^K.
// The document does not give its table; this design fills it from the
// Gaussian channel of eq. (2) with BPSK means -1 (bit 0) and +1 (bit 1):
// interval n stands for x_n = SPAN * (2n + 1 - 2^K) / 2^K and
//   f1[n] = round((2^K - 1) / (1 + exp(-2 x_n / SIGMA^2))),  f0 = 2^K-1 - f1,
// with SPAN = SPAN_MILLI/1000 and SIGMA = SIGMA_MILLI/1000 (parameters; the
// defaults 2.0 and 1.15 are this design's choice). The table is computed
// at elaboration. A positive sample therefore favours bit 1, as in the case
// study (re = 2500 is the likeliest 1). Combinational.
module prob_mapper
  import ldpc_pkg::*;
#(
  parameter int unsigned NB          = ldpc_pkg::N,
  parameter int unsigned SPAN_MILLI  = 2000,
  parameter int unsigned SIGMA_MILLI = 1150
) (
  input  sample_t re [NB],        // received samples x 1000
  output prob_t   f0 [NB],
  output prob_t   f1 [NB],
  output logic [K-1:0] interval [NB]
);
  localparam int NI = 1 << K;

  typedef prob_t table_t [NI];

  function automatic table_t make_table();
    table_t t;
    real x, p, sig2;
    sig2 = (real'(SIGMA_MILLI) / 1000.0) ** 2;
    for (int n = 0; n < NI; n++) begin
      x = (real'(SPAN_MILLI) / 1000.0) * real'(2 * n + 1 - NI) / real'(NI);
      p = real'(PMAX) / (1.0 + $exp(-2.0 * x / sig2));
      t[n] = prob_t'($rtoi(p + 0.5));
    end
    return t;
  endfunction

  localparam table_t F1_TABLE = make_table();

  sample_t vmin, vmax;
  logic signed [RW+K+1:0] span;

  always_comb begin
    vmin = re[0];
    vmax = re[0];
    for (int j = 1; j < NB; j++) begin
      if (re[j] < vmin) vmin = re[j];
      if (re[j] > vmax) vmax = re[j];
    end
    span = (RW+K+2)'(vmax) - (RW+K+2)'(vmin) + 1;
    for (int j = 0; j < NB; j++) begin
      logic signed [RW+K+1:0] num;
      logic [K-1:0] n;
      num = ((RW+K+2)'(re[j]) - (RW+K+2)'(vmin)) <<< K;
      n   = K'(num / span);
      interval[j] = n;
      f1[j] = F1_TABLE[n];
      f0[j] = prob_t'(PMAX) - F1_TABLE[n];
    end
  end
endmodule
