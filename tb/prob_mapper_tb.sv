// prob_mapper_tb: maps the received samples of the case study and random
// codewords; checks the interval of every sample (computed here from the
// codeword's min and max), the probabilities against the reference table,
// f0 + f1 = 63 and that a larger sample never gets a smaller f1.
module prob_mapper_tb;
  import ldpc_pkg::*;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  sample_t re [N];
  prob_t f0 [N], f1 [N];
  logic [K-1:0] iv [N];

  prob_mapper dut (.re(re), .f0(f0), .f1(f1), .interval(iv));

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_all();
    int rv [RN], e0 [RN], e1 [RN], ei [RN];
    foreach (re[j]) rv[j] = int'(re[j]);
    ref_map(rv, e0, e1, ei);
    foreach (re[j]) begin
      chk($sformatf("interval %0d", j), int'(iv[j]), ei[j]);
      chk($sformatf("f1 %0d", j), int'(f1[j]), e1[j]);
      chk($sformatf("f0 %0d", j), int'(f0[j]), e0[j]);
      chk("sum", int'(f0[j]) + int'(f1[j]), 63);
      foreach (re[k]) if (re[k] > re[j]) chk("monotonic", int'(f1[k] >= f1[j]), 1);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int fig [N] = '{460, 2500, -1500, -70, -3200, 980};
    automatic int fig_iv [N] = '{41, 63, 19, 35, 0, 46};
    foreach (fig[j]) re[j] = sample_t'(fig[j]);
    #1;
    foreach (fig[j]) chk($sformatf("case-study interval re%0d", j), int'(iv[j]), fig_iv[j]);
    check_all();
    // the case study's strongest samples keep their sides
    chk("re1 favours 1", int'(f1[1] > f0[1]), 1);
    chk("re4 favours 0", int'(f0[4] > f1[4]), 1);
    // all samples equal: every sample lands in interval 0
    foreach (re[j]) re[j] = sample_t'(123);
    #1;
    foreach (re[j]) chk("flat interval", int'(iv[j]), 0);
    check_all();
    for (int t = 0; t < 500; t++) begin
      foreach (re[j]) re[j] = sample_t'($signed(32'($urandom_range(0, 8190))) - 4095);
      #1;
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
