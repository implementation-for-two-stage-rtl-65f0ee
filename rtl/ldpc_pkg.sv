// ldpc_pkg: constants, types and integer helpers shared by the two-stage
// hybrid (SPA then bit-flipping) LDPC decoder.
//
// Code: the half-rate (6,3) code of the case study, N = 6 code bits and
// M = 3 parity checks. Bit b of a codeword is symbol node d(b+1); row i of H
// is parity check h(i+1). The default H is the matrix the decoder was
// simulated with: rows 001011, 010110, 100011 (written bit 5 .. bit 0).
//
// Soft values: received samples are signed integers equal to the channel
// value times 1000 (13 bits, as in the case study). A-priori probabilities
// are K = 6 bit integers with f0 + f1 = 2^K - 1 = 63 instead of 1.
//
// SPA messages are signed DW-bit integers. The decoder does not renormalise
// them, so products grow quickly; every product saturates at the DW-bit
// limits (the sign, which drives all decisions, is kept). DW = 48 is this
// design's choice: all values of the two simulated SPA iterations fit.
package ldpc_pkg;

  localparam int N  = 6;     // code length
  localparam int M  = 3;     // parity checks
  localparam int RW = 13;    // received sample width (value x 1000)
  localparam int K  = 6;     // probability resolution: 2^K intervals
  localparam int PW = K;     // width of f0/f1
  localparam int PMAX = (1 << K) - 1;  // f0 + f1
  localparam int DW = 48;    // SPA message width

  // Parity check matrix used by the decoder, row i at index i.
  localparam logic [M-1:0][N-1:0] H_DEFAULT = {6'b100011, 6'b010110, 6'b001011};

  typedef logic signed [DW-1:0] dval_t;
  typedef logic [PW-1:0]        prob_t;
  typedef logic signed [RW-1:0] sample_t;

  localparam dval_t DMAX = {1'b0, {(DW-1){1'b1}}};
  localparam dval_t DMIN = {1'b1, {(DW-1){1'b0}}};

  // Clamp a 2*DW bit signed value into DW bits.
  function automatic dval_t sat2(input logic signed [2*DW-1:0] v);
    if (v > (2*DW)'(DMAX))     return DMAX;
    else if (v < (2*DW)'(DMIN))  return DMIN;
    else                       return v[DW-1:0];
  endfunction

  function automatic dval_t sat_mul(input dval_t a, input dval_t b);
    logic signed [2*DW-1:0] p;
    p = (2*DW)'(a) * (2*DW)'(b);
    return sat2(p);
  endfunction

  function automatic dval_t sat_sub(input dval_t a, input dval_t b);
    logic signed [2*DW-1:0] d;
    d = (2*DW)'(a) - (2*DW)'(b);
    return sat2(d);
  endfunction

  // (1 + s*x) / 2 with s = +1 or -1, truncated toward zero as integer
  // division does: (1 + 0) / 2 = 0, (1 - 1127) / 2 = -563.
  function automatic dval_t half_one_pm(input dval_t x, input logic minus);
    logic signed [DW+1:0] t;
    t = minus ? ((DW+2)'(1) - (DW+2)'(x)) : ((DW+2)'(1) + (DW+2)'(x));
    t = t / 2;
    return sat2((2*DW)'(t));
  endfunction

endpackage
