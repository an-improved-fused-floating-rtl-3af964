// tb_fp3_sign_logic: exhaustive test of the effective-sign logic.
// All 32 combinations of the three signs and two op codes; the expected
// effective signs are derived from whether each term, after its op code,
// has the same sign as A.
`timescale 1ns/1ps
module tb_fp3_sign_logic;
  logic clk = 0;
  always #5 clk = ~clk;
  logic sa, sb, sc, o1, o2, ea, eb, ec, tb_s, tc_s;
  int checks = 0, failures = 0;

  fp3_sign_logic dut (.sign_a(sa), .sign_b(sb), .sign_c(sc), .op1(o1), .op2(o2),
                      .seff_a(ea), .seff_b(eb), .seff_c(ec), .tsign_b(tb_s), .tsign_c(tc_s));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic true_b_neg, true_c_neg;
      {sa, sb, sc, o1, o2} = 5'(v);
      @(posedge clk);
      // B term is negative when (B negative) differs from (subtract)
      true_b_neg = (sb != o1);
      true_c_neg = (sc != o2);
      checks++;
      if (ea !== sa || eb !== (true_b_neg != sa) || ec !== (true_c_neg != sa) ||
          tb_s !== true_b_neg || tc_s !== true_c_neg) begin
        failures++;
        $display("FAIL v=%b got %b%b%b%b%b", 5'(v), ea, eb, ec, tb_s, tc_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
