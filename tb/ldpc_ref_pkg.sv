// ldpc_ref_pkg: reference models for the decoder testbenches.
//
// Written independently of the RTL: the parity check matrix is walked as an
// edge list, arithmetic is done on 128-bit integers and clamped to the
// 48-bit message range only where the hardware stores a message, and the
// probability table is evaluated at run time with real arithmetic.
package ldpc_ref_pkg;

  localparam int RN = 6;
  localparam int RM = 3;
  localparam int RK = 6;
  localparam int RDW = 48;

  typedef logic signed [127:0] big_t;
  typedef logic [RN-1:0] word_t;
  typedef logic [RM-1:0] syn_t;
  typedef logic [RM-1:0][RN-1:0] hmat_t;

  // rows written as in the waveforms: row 0 = 001011 (bit 5 .. bit 0)
  localparam hmat_t REF_H = {6'b100011, 6'b010110, 6'b001011};

  function automatic big_t clamp(input big_t v);
    big_t hi, lo;
    hi = (big_t'(1) <<< (RDW - 1)) - 1;
    lo = -(big_t'(1) <<< (RDW - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  function automatic syn_t ref_syndrome(input word_t r, input hmat_t h);
    syn_t s;
    for (int i = 0; i < RM; i++) begin
      int ones = 0;
      for (int j = 0; j < RN; j++) if (h[i][j] && r[j]) ones++;
      s[i] = (ones % 2 == 1);
    end
    return s;
  endfunction

  // one bit-flipping step: y = S.H mod 2, flip bit j < N-1 if y[j] >= y[j+1]
  function automatic word_t ref_bf_step(input word_t r, input hmat_t h, output word_t y);
    syn_t s;
    word_t o;
    s = ref_syndrome(r, h);
    for (int j = 0; j < RN; j++) begin
      int cnt = 0;
      for (int i = 0; i < RM; i++) if (s[i] && h[i][j]) cnt++;
      y[j] = cnt[0];
    end
    o = r;
    for (int j = RN - 2; j >= 0; j--)
      if (!(y[j] == 1'b0 && y[j+1] == 1'b1)) o[j] = ~o[j];
    return o;
  endfunction

  // BF decoder: returns the final word, iterations used through 'its'
  function automatic word_t ref_bf(input word_t r, input hmat_t h, input int max_it,
                                   output int its);
    word_t w, y;
    w = r;
    its = 0;
    while (ref_syndrome(w, h) != '0 && its < max_it) begin
      w = ref_bf_step(w, h, y);
      its++;
    end
    return w;
  endfunction

  // SPA messages on edges, indexed [i][j]; zero where H is 0
  typedef big_t msg_t [RM][RN];

  // one full SPA iteration from messages q0/q1; returns the decision,
  // updates q0/q1 in place with the next-iteration messages
  function automatic word_t ref_spa_iter(input int f0 [RN], input int f1 [RN],
                                         inout msg_t q0, inout msg_t q1, input hmat_t h);
    msg_t dq, r0, r1;
    big_t p0, p1;
    word_t d;
    for (int i = 0; i < RM; i++)
      for (int j = 0; j < RN; j++)
        dq[i][j] = h[i][j] ? clamp(q0[i][j] - q1[i][j]) : 0;
    for (int i = 0; i < RM; i++)
      for (int j = 0; j < RN; j++) begin
        big_t pr = 1;
        int n = 0;
        r0[i][j] = 0;
        r1[i][j] = 0;
        if (!h[i][j]) continue;
        foreach (dq[i][k]) if (k != j && h[i][k]) begin pr = clamp(pr * dq[i][k]); n++; end
        if (n == 0) pr = 0;
        // integer division truncating toward zero
        r0[i][j] = (1 + pr) / 2;
        r1[i][j] = (1 - pr) / 2;
      end
    for (int j = 0; j < RN; j++) begin
      p0 = f0[j];
      p1 = f1[j];
      for (int i = 0; i < RM; i++) if (h[i][j]) begin
        p0 = clamp(p0 * r0[i][j]);
        p1 = clamp(p1 * r1[i][j]);
      end
      d[j] = (p1 > p0);
    end
    for (int i = 0; i < RM; i++)
      for (int j = 0; j < RN; j++) begin
        int n = 0;
        p0 = f0[j];
        p1 = f1[j];
        for (int k = 0; k < RM; k++) if (k != i && h[k][j]) begin
          p0 = clamp(p0 * r0[k][j]);
          p1 = clamp(p1 * r1[k][j]);
          n++;
        end
        q0[i][j] = (h[i][j] && n > 0) ? p0 : 0;
        q1[i][j] = (h[i][j] && n > 0) ? p1 : 0;
      end
    return d;
  endfunction

  function automatic word_t ref_spa(input int f0 [RN], input int f1 [RN], input hmat_t h,
                                    input int max_it, output int its);
    msg_t q0, q1;
    word_t d;
    for (int i = 0; i < RM; i++)
      for (int j = 0; j < RN; j++) begin
        q0[i][j] = h[i][j] ? big_t'(f0[j]) : 0;
        q1[i][j] = h[i][j] ? big_t'(f1[j]) : 0;
      end
    its = 0;
    d = '0;
    do begin
      d = ref_spa_iter(f0, f1, q0, q1, h);
      its++;
    end while (ref_syndrome(d, h) != '0 && its < max_it);
    return d;
  endfunction

  // probability mapping: interval by the codeword's min/max, logistic table
  function automatic void ref_map(input int re [RN], output int f0 [RN], output int f1 [RN],
                                  output int iv [RN]);
    int mn, mx;
    real x, p;
    mn = re[0];
    mx = re[0];
    foreach (re[j]) begin
      if (re[j] < mn) mn = re[j];
      if (re[j] > mx) mx = re[j];
    end
    foreach (re[j]) begin
      iv[j] = ((re[j] - mn) * 64) / (mx - mn + 1);
      x = 2.0 * (2 * iv[j] + 1 - 64) / 64.0;
      p = 63.0 / (1.0 + $exp(-2.0 * x / (1.15 * 1.15)));
      f1[j] = $rtoi(p + 0.5);
      f0[j] = 63 - f1[j];
    end
  endfunction

endpackage
