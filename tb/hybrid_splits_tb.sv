// hybrid_splits_tb: the two-stage decoder with the other iteration splits
// evaluated for it, on the (6,3) code: three SPA and no BF iterations (the
// SPA-alone comparison point, where stage two is never used), two SPA and
// eight BF iterations (the split of the long-code study), and the default
// one plus two. All three decode the same noisy frames side by side; each
// result and latency is compared with the reference chain. Counts SPA
// stopping before its limit, the BF stage running past two iterations,
// and frames decoded correctly by each split.
module hybrid_splits_tb;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  localparam int NS = 3;
  localparam int SPA_IT [NS] = '{3, 2, 1};
  localparam int BF_IT  [NS] = '{0, 8, 2};
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  sample_t re [N];
  logic busy [NS], done [NS], success [NS], bf_used [NS];
  logic [N-1:0] decoded [NS], spa_decoded [NS];
  logic [M-1:0] syndrome [NS], spa_syndrome [NS];
  logic [3:0] spa_its [NS], bf_its [NS];
  int lat [NS];
  int n_correct [NS] = '{0, 0, 0};
  int n_spa_early = 0, n_bf_long = 0;
  logic [N-1:0] codewords [$];

  always #5 clk = ~clk;

  for (genvar g = 0; g < NS; g++) begin : g_dec
    hybrid_decoder #(.SPA_ITERS(SPA_IT[g]), .BF_ITERS(BF_IT[g])) dut (
      .clk(clk), .rst_n(rst_n), .start(start), .re(re), .busy(busy[g]),
      .done(done[g]), .decoded(decoded[g]), .syndrome(syndrome[g]), .success(success[g]),
      .bf_used(bf_used[g]), .spa_iterations(spa_its[g]), .bf_iterations(bf_its[g]),
      .spa_decoded(spa_decoded[g]), .spa_syndrome(spa_syndrome[g]));
  end

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic decode(input int samples [N], input string tag, input logic [N-1:0] sent);
    int f0 [RN], f1 [RN], iv [RN];
    int cyc;
    ref_map(samples, f0, f1, iv);
    foreach (samples[j]) re[j] = sample_t'(samples[j]);
    foreach (lat[g]) lat[g] = 0;
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 1;
    #1;
    while (!(lat[0] > 0 && lat[1] > 0 && lat[2] > 0)) begin
      foreach (done[g]) if (done[g] && lat[g] == 0) lat[g] = cyc;
      if (lat[0] > 0 && lat[1] > 0 && lat[2] > 0) break;
      @(posedge clk);
      #1;
      cyc++;
    end
    for (int g = 0; g < NS; g++) begin
      int sits, bits;
      logic [N-1:0] e_spa, e_out;
      logic use_bf;
      string t;
      t = $sformatf("%s split %0d+%0d", tag, SPA_IT[g], BF_IT[g]);
      e_spa = ref_spa(f0, f1, REF_H, SPA_IT[g], sits);
      use_bf = (ref_syndrome(e_spa, REF_H) != '0) && BF_IT[g] > 0;
      bits = 0;
      e_out = use_bf ? ref_bf(e_spa, REF_H, BF_IT[g], bits) : e_spa;
      chk({t, " spa decision"}, int'(spa_decoded[g]), int'(e_spa));
      chk({t, " spa iterations"}, int'(spa_its[g]), sits);
      chk({t, " bf used"}, int'(bf_used[g]), int'(use_bf));
      chk({t, " bf iterations"}, int'(bf_its[g]), bits);
      chk({t, " decoded"}, int'(decoded[g]), int'(e_out));
      chk({t, " success"}, int'(success[g]), int'(ref_syndrome(e_out, REF_H) == '0));
      chk({t, " latency"}, lat[g], use_bf ? 6 + 2 * sits + bits : 4 + 2 * sits);
      if (decoded[g] == sent) n_correct[g]++;
      if (sits < SPA_IT[g]) n_spa_early++;
      if (bits > 2) n_bf_long++;
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int fig [N] = '{460, 2500, -1500, -70, -3200, 980};
    for (int w = 0; w < 64; w++)
      if (ref_syndrome(6'(w), REF_H) == '0) codewords.push_back(6'(w));
    repeat (3) @(posedge clk);
    rst_n = 1;
    decode(fig, "case study", 6'b000000);
    for (int t = 0; t < 1500; t++) begin
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
      decode(s, $sformatf("frame %0d", t), c);
    end
    $display("correct of 1501: 3+0 %0d, 2+8 %0d, 1+2 %0d; SPA early stops %0d, BF runs past 2 iterations %0d",
             n_correct[0], n_correct[1], n_correct[2], n_spa_early, n_bf_long);
    chk("SPA stop before its limit seen", int'(n_spa_early > 0), 1);
    chk("BF past two iterations seen", int'(n_bf_long > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
