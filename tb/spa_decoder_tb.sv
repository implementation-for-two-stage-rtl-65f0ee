// spa_decoder_tb: sum-product stage with three iterations (the SPA-alone
// case study). Starts from the a-priori probabilities of the case study and
// checks the first-iteration messages printed in its waveforms (those that
// do not depend on the one printed dQ entry the equations do not give, see
// spa_horizontal_tb), then the decision, syndrome and iteration count
// against the reference model, and the latency 1 + 2 * iterations cycles;
// then random probabilities, and a codeword that is accepted at once.
module spa_decoder_tb;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  prob_t f0 [N], f1 [N];
  logic busy, done, success;
  logic [N-1:0] decoded;
  logic [M-1:0] syndrome;
  logic [3:0] iterations;
  dval_t dq [M][N], dr [M][N], r0 [M][N], r1 [M][N], qn0 [N], qn1 [N];
  int n_early = 0, n_limit = 0;

  always #5 clk = ~clk;

  spa_decoder #(.MAX_ITERS(3)) dut (.clk(clk), .rst_n(rst_n), .start(start), .f0(f0), .f1(f1),
    .busy(busy), .done(done), .decoded(decoded), .syndrome(syndrome), .success(success),
    .iterations(iterations), .dq_o(dq), .dr_o(dr), .r0_o(r0), .r1_o(r1), .qn0_o(qn0), .qn1_o(qn1));

  task automatic chk(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // run one decode, compare with the reference, return the cycle count
  task automatic run(input int a [N], input int b [N], input string tag);
    int its, cyc;
    logic [N-1:0] e;
    e = ref_spa(a, b, REF_H, 3, its);
    foreach (a[j]) begin f0[j] = prob_t'(a[j]); f1[j] = prob_t'(b[j]); end
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    cyc = 1;
    #1;
    while (!done) begin @(posedge clk); #1; cyc++; end
    chk({tag, " decoded"}, longint'(decoded), longint'(e));
    chk({tag, " iterations"}, longint'(iterations), its);
    chk({tag, " syndrome"}, longint'(syndrome), longint'(ref_syndrome(e, REF_H)));
    chk({tag, " success"}, longint'(success), longint'(ref_syndrome(e, REF_H) == '0));
    chk({tag, " latency"}, cyc, 1 + 2 * its);
    if (its < 3) n_early++;
    else n_limit++;
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // case-study a-priori values, index = bit (the waveforms print bit 5 first)
    automatic int fz [N] = '{20, 7, 54, 38, 60, 13};
    automatic int fo [N] = '{43, 56, 9, 25, 3, 50};
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (fz[j]) begin f0[j] = prob_t'(fz[j]); f1[j] = prob_t'(fo[j]); end
    @(posedge clk);
    start <= 1;
    @(posedge clk);
    start <= 0;
    @(posedge clk);  // HOR registered
    @(posedge clk);
    // first-iteration messages of checks 0 and 2 as printed
    chk("dq[0] bit3", dq[0][3], 13);   chk("dq[0] bit1", dq[0][1], -49);  chk("dq[0] bit0", dq[0][0], -23);
    chk("dq[2] bit5", dq[2][5], -37);  chk("dq[2] bit1", dq[2][1], -49);  chk("dq[2] bit0", dq[2][0], -23);
    chk("dr[0] bit3", dr[0][3], 1127); chk("dr[0] bit1", dr[0][1], -299); chk("dr[0] bit0", dr[0][0], -637);
    chk("dr[2] bit5", dr[2][5], 1127); chk("dr[2] bit1", dr[2][1], 851);  chk("dr[2] bit0", dr[2][0], 1813);
    chk("dr[1] bit4", dr[1][4], -2205);
    chk("r0[0] bit3", r0[0][3], 564);  chk("r1[0] bit3", r1[0][3], -563);
    chk("r0[2] bit0", r0[2][0], 907);  chk("r1[2] bit0", r1[2][0], -906);
    chk("r0[1] bit4", r0[1][4], -1102); chk("r1[1] bit4", r1[1][4], 1103);
    // posteriors of the bits that only see checks 0 and 2 as printed
    @(posedge clk);
    chk("q0_new bit5", qn0[5], 7332);    chk("q1_new bit5", qn1[5], -28150);
    chk("q0_new bit3", qn0[3], 21432);   chk("q1_new bit3", qn1[3], -14075);
    chk("q0_new bit0", qn0[0], -5768520); chk("q1_new bit0", qn1[0], -12427602);
    chk("q0_new bit4", qn0[4], -66120);  chk("q1_new bit4", qn1[4], 3309);
    wait (!busy);
    @(posedge clk);
    run(fz, fo, "case study");

    // random a-priori probabilities
    for (int t = 0; t < 300; t++) begin
      int a [N], b [N];
      foreach (a[j]) begin b[j] = $urandom_range(0, 63); a[j] = 63 - b[j]; end
      run(a, b, $sformatf("random %0d", t));
    end
    // a clean all-zero codeword is accepted after one iteration
    begin
      int a [N], b [N];
      foreach (a[j]) begin a[j] = 60; b[j] = 3; end
      run(a, b, "clean");
      chk("clean decision", longint'(decoded), 0);
      chk("clean one iteration", longint'(iterations), 1);
    end
    chk("early stop seen", longint'(n_early > 0), 1);
    chk("iteration limit seen", longint'(n_limit > 0), 1);
    $display("early %0d limit %0d", n_early, n_limit);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
