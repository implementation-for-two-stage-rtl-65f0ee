// bf_flip_tb: checks y = S.H and the flip rule on the five flip steps of
// the case-study waveforms, then on every word with its own syndrome and
// with every other syndrome against the reference model.
module bf_flip_tb;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] r, y, flip, r_next, y_ref, n_ref;
  logic [2:0] s;

  bf_flip dut (.r(r), .s(s), .y(y), .flip(flip), .r_next(r_next));

  task automatic check(input string what, input logic [5:0] got, input logic [5:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic step(input logic [5:0] rin, input logic [2:0] sin,
                      input logic [5:0] yexp, input logic [5:0] rexp);
    r = rin;
    s = sin;
    #1;
    check($sformatf("y for %b", rin), y, yexp);
    check($sformatf("r' for %b", rin), r_next, rexp);
    check("flip mask", flip, rin ^ rexp);
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // BF alone, three iterations
    step(6'b100011, 3'b110, 6'b110101, 6'b110110);
    step(6'b110110, 3'b011, 6'b011101, 6'b101011);
    step(6'b101011, 3'b111, 6'b111110, 6'b110101);
    // hybrid, BF stage
    step(6'b010000, 3'b010, 6'b010110, 6'b000110);
    step(6'b000110, 3'b101, 6'b101000, 6'b001101);
    for (int w = 0; w < 64; w++)
      for (int sv = 0; sv < 8; sv++) begin
        logic [5:0] yy;
        logic [2:0] ss;
        ss = 3'(sv);
        // the reference derives S from the word, so feed matching pairs
        if (ss != ref_syndrome(6'(w), REF_H)) continue;
        n_ref = ref_bf_step(6'(w), REF_H, yy);
        y_ref = yy;
        r = 6'(w);
        s = ss;
        #1;
        check($sformatf("y %b", r), y, y_ref);
        check($sformatf("r' %b", r), r_next, n_ref);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
