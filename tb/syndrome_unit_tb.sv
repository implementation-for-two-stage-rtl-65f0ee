// syndrome_unit_tb: checks the syndrome of all 64 words of the (6,3) code
// against the reference model, plus the syndromes printed in the case-study
// waveforms (written s2 s1 s0 there).
module syndrome_unit_tb;
  import ldpc_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [5:0] r;
  logic [2:0] s;
  logic       zero;

  syndrome_unit dut (.r(r), .s(s), .zero(zero));

  task automatic check(input string what, input logic [2:0] got, input logic [2:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
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
    // words and syndromes from the waveforms
    r = 6'b100011; #1 check("re", s, 3'b110);
    r = 6'b110110; #1 check("bf it1", s, 3'b011);
    r = 6'b101011; #1 check("bf it2", s, 3'b111);
    r = 6'b110101; #1 check("bf it3", s, 3'b001);
    r = 6'b010000; #1 check("spa it1", s, 3'b010);
    r = 6'b000110; #1 check("hyb bf it1", s, 3'b101);
    r = 6'b001101; #1 check("hyb bf it2", s, 3'b110);
    for (int w = 0; w < 64; w++) begin
      r = 6'(w);
      #1;
      check($sformatf("word %b", r), s, ref_syndrome(r, REF_H));
      check("zero flag", {2'b0, zero}, {2'b0, ref_syndrome(r, REF_H) == 3'b000});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
