// spa_horizontal_tb: drives the horizontal step with the messages of the
// case-study waveforms (first and second SPA iteration) and checks dQ, dR,
// R0 and R1; then random messages against an inline model, and saturation.
// Arrays below are written bit 5 .. bit 0, as the waveforms print them.
module spa_horizontal_tb;
  import ldpc_pkg::*;
  int checks = 0, failures = 0;
  dval_t q0 [M][N], q1 [M][N], dq [M][N], dr [M][N], r0 [M][N], r1 [M][N];

  typedef longint row_t [N];

  spa_horizontal dut (.q0(q0), .q1(q1), .dq(dq), .dr(dr), .r0(r0), .r1(r1));

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
    // ---- first iteration: Q = f on every edge
    set_row(q0, 0, '{0,0,38,0,7,20});  set_row(q1, 0, '{0,0,25,0,56,43});
    set_row(q0, 1, '{0,60,0,54,7,0});  set_row(q1, 1, '{0,3,0,9,56,0});
    set_row(q0, 2, '{13,0,0,0,7,20});  set_row(q1, 2, '{50,0,0,0,56,43});
    #1;
    chk_row("dq", dq, 0, '{0,0,13,0,-49,-23});
    chk_row("dq", dq, 2, '{-37,0,0,0,-49,-23});
    // check 2 by eq. (3): 60 - 3 = 57, 54 - 9 = 45, 7 - 56 = -49
    chk_row("dq", dq, 1, '{0,57,0,45,-49,0});
    chk_row("dr", dr, 0, '{0,0,1127,0,-299,-637});
    chk_row("dr", dr, 2, '{1127,0,0,0,851,1813});
    chk_row("dr", dr, 1, '{0,-2205,0,57*-49,57*45,0});
    chk_row("r0", r0, 0, '{0,0,564,0,-149,-318});
    chk_row("r1", r1, 0, '{0,0,-563,0,150,319});
    chk_row("r0", r0, 2, '{564,0,0,0,426,907});
    chk_row("r1", r1, 2, '{-563,0,0,0,-425,-906});
    chk_row("r0", r0, 1, '{0,-1102,0,-1396,1283,0});
    chk_row("r1", r1, 1, '{0,1103,0,1397,-1282,0});

    // ---- second iteration of the waveforms: updated messages
    set_row(q0, 0, '{0,0,0,0,0,18140});    set_row(q1, 0, '{0,0,0,0,0,-38958});
    set_row(q0, 1, '{0,0,0,0,-444318,0});  set_row(q1, 1, '{0,0,0,0,-3570000,0});
    set_row(q0, 2, '{0,0,0,0,0,-6360});    set_row(q1, 2, '{0,0,0,0,0,13717});
    #1;
    chk_row("dq2", dq, 0, '{0,0,0,0,0,57098});
    chk_row("dq2", dq, 1, '{0,0,0,0,3125682,0});
    chk_row("dq2", dq, 2, '{0,0,0,0,0,-20077});
    for (int i = 0; i < M; i++) begin
      chk_row("dr2", dr, i, '{0,0,0,0,0,0});
      chk_row("r0_2", r0, i, '{0,0,0,0,0,0});
      chk_row("r1_2", r1, i, '{0,0,0,0,0,0});
    end

    // ---- random small messages against an inline model
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) begin
          q0[i][j] = H_DEFAULT[i][j] ? dval_t'($signed(32'($urandom_range(0, 4000))) - 2000) : '0;
          q1[i][j] = H_DEFAULT[i][j] ? dval_t'($signed(32'($urandom_range(0, 4000))) - 2000) : '0;
        end
      #1;
      for (int i = 0; i < M; i++)
        for (int j = 0; j < N; j++) begin
          longint d, p, e0;
          int n;
          d = H_DEFAULT[i][j] ? longint'(q0[i][j]) - longint'(q1[i][j]) : 0;
          chk("rand dq", dq[i][j], d);
          p = 1;
          n = 0;
          for (int k = 0; k < N; k++)
            if (k != j && H_DEFAULT[i][k]) begin
              p = p * (longint'(q0[i][k]) - longint'(q1[i][k]));
              n++;
            end
          if (!H_DEFAULT[i][j] || n == 0) p = 0;
          chk("rand dr", dr[i][j], p);
          e0 = H_DEFAULT[i][j] ? (1 + p) / 2 : 0;
          chk("rand r0", r0[i][j], e0);
          chk("rand r1", r1[i][j], H_DEFAULT[i][j] ? (1 - p) / 2 : 0);
        end
    end

    // ---- saturation: two large messages in check 0 multiply past 48 bits
    for (int i = 0; i < M; i++)
      for (int j = 0; j < N; j++) begin q0[i][j] = '0; q1[i][j] = '0; end
    q0[0][0] = dval_t'(64'sd1 <<< 40);  q1[0][0] = -dval_t'(64'sd1 <<< 40);
    q0[0][1] = dval_t'(64'sd1 <<< 30);
    q0[0][3] = -dval_t'(64'sd1 <<< 30);
    #1;
    chk("sat dq", dq[0][0], longint'(1) <<< 41);
    chk("sat dr+", dr[0][3], (longint'(1) <<< 47) - 1);
    chk("sat dr-", dr[0][1], -(longint'(1) <<< 47));
    chk("sat r0", r0[0][3], (longint'(1) <<< 46));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
