// hybrid_decoder_tb: end-to-end test of the two-stage decoder at its
// default parameters (the (6,3) case study: one SPA, then up to two BF
// iterations). Decodes the case-study samples and noisy BPSK transmissions
// of every codeword; each result is compared with a reference chain
// (probability mapping, SPA, BF), and the latency, counted in clock edges
// from the one that takes start to the one that raises done, with
//   4 + 2 * SPA iterations                  when stage two is bypassed,
//   6 + 2 * SPA iterations + BF iterations  when it runs.
// Counts the decoder's mechanisms: bypass after a satisfied SPA syndrome,
// BF correcting to a zero syndrome, and BF stopping at its iteration limit;
// a mechanism that never happens is a failure.
module hybrid_decoder_tb;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  sample_t re [N];
  logic busy, done, success, bf_used;
  logic [N-1:0] decoded, spa_decoded;
  logic [M-1:0] syndrome, spa_syndrome;
  logic [3:0] spa_its, bf_its;
  int n_bypass = 0, n_bf_fixed = 0, n_bf_limit = 0, n_correct = 0, n_frames = 0;
  logic [N-1:0] codewords [$];

  always #5 clk = ~clk;

  hybrid_decoder dut (.clk(clk), .rst_n(rst_n), .start(start), .re(re), .busy(busy),
    .done(done), .decoded(decoded), .syndrome(syndrome), .success(success),
    .bf_used(bf_used), .spa_iterations(spa_its), .bf_iterations(bf_its),
    .spa_decoded(spa_decoded), .spa_syndrome(spa_syndrome));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (%b) expected %0d (%b)", what, got, got, exp, exp);
    end
  endtask

  task automatic decode(input int samples [N], input string tag, output logic [N-1:0] out);
    int f0 [RN], f1 [RN], iv [RN];
    int sits, bits, cyc, exp_lat;
    logic [N-1:0] e_spa, e_out;
    logic use_bf;
    ref_map(samples, f0, f1, iv);
    e_spa = ref_spa(f0, f1, REF_H, 1, sits);
    use_bf = (ref_syndrome(e_spa, REF_H) != '0);
    bits = 0;
    e_out = use_bf ? ref_bf(e_spa, REF_H, 2, bits) : e_spa;
    exp_lat = use_bf ? 6 + 2 * sits + bits : 4 + 2 * sits;

    foreach (samples[j]) re[j] = sample_t'(samples[j]);
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 1;
    #1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    chk({tag, " spa decision"}, int'(spa_decoded), int'(e_spa));
    chk({tag, " spa syndrome"}, int'(spa_syndrome), int'(ref_syndrome(e_spa, REF_H)));
    chk({tag, " spa iterations"}, int'(spa_its), sits);
    chk({tag, " bf used"}, int'(bf_used), int'(use_bf));
    chk({tag, " bf iterations"}, int'(bf_its), bits);
    chk({tag, " decoded"}, int'(decoded), int'(e_out));
    chk({tag, " syndrome"}, int'(syndrome), int'(ref_syndrome(e_out, REF_H)));
    chk({tag, " success"}, int'(success), int'(ref_syndrome(e_out, REF_H) == '0));
    chk({tag, " latency"}, cyc, exp_lat);
    if (!bf_used) n_bypass++;
    else if (success) n_bf_fixed++;
    else if (int'(bf_its) == 2) n_bf_limit++;
    out = decoded;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int fig [N] = '{460, 2500, -1500, -70, -3200, 980};
    logic [N-1:0] out;
    for (int w = 0; w < 64; w++)
      if (ref_syndrome(6'(w), REF_H) == '0) codewords.push_back(6'(w));
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    decode(fig, "case study", out);
    $display("case study: SPA decision %b, output %b, syndrome %b", spa_decoded, out, syndrome);

    // noisy BPSK frames: bit 1 -> +1000, bit 0 -> -1000, noise = sum of
    // four uniform draws (roughly Gaussian), clipped to 13 bits
    for (int t = 0; t < 2000; t++) begin
      int s [N];
      int amp;
      logic [N-1:0] c;
      c = codewords[$urandom_range(0, codewords.size() - 1)];
      amp = 300 + 250 * (t % 8);
      foreach (s[j]) begin
        int nz;
        nz = 0;
        repeat (4) nz += $signed($urandom_range(0, 2 * amp)) - amp;
        s[j] = (c[j] ? 1000 : -1000) + nz;
        if (s[j] > 4095) s[j] = 4095;
        if (s[j] < -4095) s[j] = -4095;
      end
      decode(s, $sformatf("frame %0d", t), out);
      n_frames++;
      if (out == c) n_correct++;
    end
    $display("frames %0d correct %0d bypass %0d bf_fixed %0d bf_limit %0d",
             n_frames, n_correct, n_bypass, n_bf_fixed, n_bf_limit);
    chk("bypass of stage two seen", int'(n_bypass > 0), 1);
    chk("BF reaching a zero syndrome seen", int'(n_bf_fixed > 0), 1);
    chk("BF iteration limit seen", int'(n_bf_limit > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
