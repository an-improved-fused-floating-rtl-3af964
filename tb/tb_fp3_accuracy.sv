// tb_fp3_accuracy: fused adder against a network of two discrete adders.
//
// For random finite triples (biased towards nearby exponents, where
// cancellation makes double rounding visible) it forms the exact sum, the
// fused result y of fp3_adder, and the result of two separately rounded
// additions ((a op1 b) rounded, then op2 c, rounded; each step modelled by
// the correctly rounded reference). Checks: the fused result equals the
// correctly rounded sum, and its error is never larger than the discrete
// network's. Reports how often the discrete network differs and how often it
// loses all significance (returns zero, or the wrong sign, for a non-zero sum).
`timescale 1ns/1ps
module tb_fp3_accuracy;
  import fp3_ref_pkg::*;

  localparam int N = 100000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, c, y, d1, d2;
  logic        op1, op2;
  int checks = 0, failures = 0, n_differ = 0, n_lost = 0, n_finite = 0;

  fp3_adder dut (.a(a), .b(b), .c(c), .op1(op1), .op2(op2), .y(y));

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic big_t absb(big_t v);
    return (v < 0) ? -v : v;
  endfunction

  function automatic bit finite(logic [31:0] x);
    return x[30:23] != 8'hFF;
  endfunction

  initial begin
    big_t ex, ef, ed;
    int base;
    for (int n = 0; n < N; n++) begin
      base = int'($urandom_range(30, 220));
      a = rand_fp(base, (n % 2) ? 1 : 30, 0);
      b = rand_fp(base, (n % 2) ? 1 : 30, 0);
      c = rand_fp(base, (n % 2) ? 1 : 30, 0);
      op1 = 1'($urandom); op2 = 1'($urandom);
      @(posedge clk);
      d1 = ref_add3(a, b, 32'h0, op1, 1'b0);
      d2 = ref_add3(d1, c, 32'h0, op2, 1'b0);
      checks++;
      if (y !== ref_add3(a, b, c, op1, op2)) begin
        failures++;
        if (failures < 10) $display("FAIL not correctly rounded a=%h b=%h c=%h", a, b, c);
      end
      if (!finite(y) || !finite(d2)) continue;
      n_finite++;
      ex = exact3(a, b, c, op1, op2);
      ef = absb(to_big(y) - ex);
      ed = absb(to_big(d2) - ex);
      checks++;
      if (ef > ed) begin
        failures++;
        if (failures < 10) $display("FAIL fused worse a=%h b=%h c=%h", a, b, c);
      end
      if (d2 != y && !(d2[30:0] == 0 && y[30:0] == 0)) n_differ++;
      if (ex != 0 && (d2[30:0] == 0 || (d2[31] != (ex < 0)))) n_lost++;
    end
    $display("finite cases=%0d discrete network differs=%0d loses all significance=%0d",
             n_finite, n_differ, n_lost);
    if (n_differ == 0) failures++;   // the workload must exercise double rounding
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
