// spa_vertical_tb: drives the vertical step with the a-priori values and
// the check messages of the case-study waveforms and checks the posteriors,
// the hard decision and the updated messages printed there; then the
// all-zero messages of the second iteration, and random messages against
// an inline model. Arrays are written bit 5 .. bit 0.
module spa_vertical_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  prob_t f0 [N], f1 [N];
  dval_t r0 [M][N], r1 [M][N], qu0 [M][N], qu1 [M][N];
  dval_t qn0 [N], qn1 [N];
  logic [N-1:0] dec;

  typedef longint row_t [N];

  spa_vertical dut (.f0(f0), .f1(f1), .r0(r0), .r1(r1), .qn0(qn0), .qn1(qn1),
                    .dec(dec), .qu0(qu0), .qu1(qu1));

  task automatic set_row(ref dval_t a [M][N], input int i, input row_t v);
    for (int p = 0; p < N; p++) a[i][N-1-p] = dval_t'(v[p]);
  endtask

  task automatic chk(input string what, input dval_t got, input longint exp);
    checks++;
    if (got != dval_t'(exp)) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic chk_vec(input string what, input dval_t a [N], input row_t v);
    for (int p = 0; p < N; p++) chk($sformatf("%s bit %0d", what, N-1-p), a[N-1-p], v[p]);
  endtask

  task automatic chk_row(input string what, ref dval_t a [M][N], input int i, input row_t v);
    for (int p = 0; p < N; p++) chk($sformatf("%s[%0d] bit %0d", what, i, N-1-p), a[i][N-1-p], v[p]);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int fz [N] = '{13,60,38,54,7,20};
    automatic int fo [N] = '{50,3,25,9,56,43};
    for (int p = 0; p < N; p++) begin
      f0[N-1-p] = prob_t'(fz[p]);
      f1[N-1-p] = prob_t'(fo[p]);
    end
    set_row(r0, 0, '{0,0,564,0,-149,-318});  set_row(r1, 0, '{0,0,-563,0,150,319});
    set_row(r0, 1, '{0,-1102,0,0,0,0});      set_row(r1, 1, '{0,1103,0,0,0,0});
    set_row(r0, 2, '{564,0,0,0,426,907});    set_row(r1, 2, '{-563,0,0,0,-425,-906});
    #1;
    chk_vec("q0_new", qn0, '{7332,-66120,21432,0,0,-5768520});
    chk_vec("q1_new", qn1, '{-28150,3309,-14075,0,0,-12427602});
    chk("decision", dval_t'(dec), 6'b010000);
    chk_row("q0_update", qu0, 0, '{0,0,0,0,0,18140});
    chk_row("q0_update", qu0, 1, '{0,0,0,0,-444318,0});
    chk_row("q0_update", qu0, 2, '{0,0,0,0,0,-6360});
    chk_row("q1_update", qu1, 0, '{0,0,0,0,0,-38958});
    chk_row("q1_update", qu1, 1, '{0,0,0,0,-3570000,0});
    chk_row("q1_update", qu1, 2, '{0,0,0,0,0,13717});

    // second iteration: every R is 0, so every posterior ties and decides 0
    for (int i = 0; i < M; i++) begin
      set_row(r0, i, '{0,0,0,0,0,0});
      set_row(r1, i, '{0,0,0,0,0,0});
    end
    #1;
    chk_vec("q0_new 2", qn0, '{0,0,0,0,0,0});
    chk_vec("q1_new 2", qn1, '{0,0,0,0,0,0});
    chk("decision 2", dval_t'(dec), 0);

    for (int t = 0; t < 200; t++) begin
      for (int j = 0; j < N; j++) begin
        f1[j] = prob_t'($urandom_range(0, 63));
        f0[j] = prob_t'(63 - int'(f1[j]));
      end
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) begin
          r0[i][j] = H_DEFAULT[i][j] ? dval_t'($signed(32'($urandom_range(0, 2000))) - 1000) : '0;
          r1[i][j] = H_DEFAULT[i][j] ? dval_t'($signed(32'($urandom_range(0, 2000))) - 1000) : '0;
        end
      #1;
      for (int j = 0; j < N; j++) begin
        longint a0, a1;
        a0 = longint'(f0[j]);
        a1 = longint'(f1[j]);
        for (int i = 0; i < M; i++)
          if (H_DEFAULT[i][j]) begin
            a0 = a0 * longint'(r0[i][j]);
            a1 = a1 * longint'(r1[i][j]);
          end
        chk("rand qn0", qn0[j], a0);
        chk("rand qn1", qn1[j], a1);
        chk("rand dec", dval_t'(dec[j]), (a1 > a0) ? 1 : 0);
        for (int i = 0; i < M; i++) begin
          longint b0, b1;
          int n;
          b0 = longint'(f0[j]);
          b1 = longint'(f1[j]);
          n = 0;
          for (int k = 0; k < M; k++)
            if (k != i && H_DEFAULT[k][j]) begin
              b0 = b0 * longint'(r0[k][j]);
              b1 = b1 * longint'(r1[k][j]);
              n++;
            end
          if (!H_DEFAULT[i][j] || n == 0) begin b0 = 0; b1 = 0; end
          chk("rand qu0", qu0[i][j], b0);
          chk("rand qu1", qu1[i][j], b1);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
