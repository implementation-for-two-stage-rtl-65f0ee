// bf_decoder_tb: bit-flipping stage. Replays the case study (BF alone,
// three iterations, received word 100011: 110110, 101011, 110101, final
// syndrome 001) and the BF share of the hybrid case study (two iterations
// from 010000: 000110, 001101, syndrome 110); then every 6-bit word against
// the reference model, with the latency 2 + iterations cycles.
module bf_decoder_tb;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic start3 = 0, start2 = 0;
  logic [N-1:0] r_in;
  logic busy3, done3, succ3, busy2, done2, succ2;
  logic [N-1:0] dec3, dec2, y3, y2;
  logic [M-1:0] syn3, syn2;
  logic [3:0] it3, it2;
  int n_success = 0, n_limit = 0, n_clean = 0;

  always #5 clk = ~clk;

  bf_decoder #(.MAX_ITERS(3)) dut3 (.clk(clk), .rst_n(rst_n), .start(start3), .r_in(r_in),
    .busy(busy3), .done(done3), .decoded(dec3), .syndrome(syn3), .success(succ3),
    .iterations(it3), .y_o(y3));
  bf_decoder dut2 (.clk(clk), .rst_n(rst_n), .start(start2), .r_in(r_in),
    .busy(busy2), .done(done2), .decoded(dec2), .syndrome(syn2), .success(succ2),
    .iterations(it2), .y_o(y2));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d (%b) expected %0d (%b)", what, got, got, exp, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic logic [N-1:0] seq3 [3] = '{6'b110110, 6'b101011, 6'b110101};
    automatic logic [N-1:0] ys3 [3]  = '{6'b110101, 6'b011101, 6'b111110};
    automatic logic [N-1:0] seq2 [2] = '{6'b000110, 6'b001101};
    automatic int k;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // ---- case study, BF alone
    r_in <= 6'b100011;
    start3 <= 1;
    @(posedge clk);
    start3 <= 0;
    k = 0;
    @(posedge clk);  // first RUN cycle: syndrome 110, flip
    while (!done3) begin
      @(posedge clk);
      if (!done3 && k < 3) begin
        chk($sformatf("BF iteration %0d word", k + 1), int'(dec3), int'(seq3[k]));
        chk($sformatf("BF iteration %0d y", k + 1), int'(y3), int'(ys3[k]));
        k++;
      end
    end
    chk("BF final word", int'(dec3), int'(6'b110101));
    chk("BF final syndrome", int'(syn3), int'(3'b001));
    chk("BF iterations", int'(it3), 3);
    chk("BF success", int'(succ3), 0);

    // ---- case study, BF share of the hybrid (two iterations)
    @(posedge clk);
    r_in <= 6'b010000;
    start2 <= 1;
    @(posedge clk);
    start2 <= 0;
    k = 0;
    @(posedge clk);
    while (!done2) begin
      @(posedge clk);
      if (!done2 && k < 2) begin
        chk($sformatf("hybrid BF iteration %0d", k + 1), int'(dec2), int'(seq2[k]));
        k++;
      end
    end
    chk("hybrid BF word", int'(dec2), int'(6'b001101));
    chk("hybrid BF syndrome", int'(syn2), int'(3'b110));
    chk("hybrid BF iterations", int'(it2), 2);

    // ---- every word against the reference, with latency
    for (int w = 0; w < 64; w++) begin
      int its, cyc;
      logic [N-1:0] e;
      e = ref_bf(6'(w), REF_H, 3, its);
      @(posedge clk);
      r_in <= 6'(w);
      start3 <= 1;
      @(posedge clk);
      start3 <= 0;
      cyc = 1;
      #1;
      while (!done3) begin @(posedge clk); #1; cyc++; end
      chk($sformatf("word %b decoded", 6'(w)), int'(dec3), int'(e));
      chk("iterations", int'(it3), its);
      chk("syndrome", int'(syn3), int'(ref_syndrome(e, REF_H)));
      chk("success", int'(succ3), int'(ref_syndrome(e, REF_H) == '0));
      chk("latency", cyc, 2 + its);
      if (its == 0) n_clean++;
      else if (succ3) n_success++;
      else n_limit++;
    end
    chk("zero syndrome passed unchanged seen", int'(n_clean > 0), 1);
    chk("flipped to zero syndrome seen", int'(n_success > 0), 1);
    chk("iteration limit seen", int'(n_limit > 0), 1);
    $display("clean %0d corrected %0d limit %0d", n_clean, n_success, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
