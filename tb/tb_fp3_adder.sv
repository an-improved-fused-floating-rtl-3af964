// tb_fp3_adder: end-to-end test of the fused three-term adder.
//
// Drives directed and random operand triples and op codes into fp3_adder
// (default parameters) and compares y with the correctly rounded exact sum
// from fp3_ref_pkg::ref_add3. The random operands are biased towards the
// hard cases: equal or nearby exponents (massive cancellation), exact
// cancellation of two terms with a small third term, far-apart exponents,
// rounding ties, subnormals, overflow and special values.
// It also counts how often each mechanism of the datapath fired (negative
// significand sum and -S pair, two inverted terms, LZA one short, subnormal
// shift limit, round-up, significand carry-out, far and cancellation
// shortcuts, overflow, NaN/infinity) and counts a failure for any that
// never did. The adder is combinational; a clock only paces the vectors.
`timescale 1ns/1ps
module tb_fp3_adder;
  import fp3_ref_pkg::*;

  localparam int NRAND = 300000;

  logic clk = 0;
  always #5 clk = ~clk;

  logic [31:0] a, b, c, y, exp_y;
  logic        op1, op2;
  int checks = 0, failures = 0;
  int n_neg = 0, n_two_inv = 0, n_lza_short = 0, n_at_min = 0, n_inc = 0,
      n_carry = 0, n_far = 0, n_cancel = 0, n_ovf = 0, n_special = 0, n_sub_out = 0;

  fp3_adder dut (.a(a), .b(b), .c(c), .op1(op1), .op2(op2), .y(y));

  task automatic apply(logic [31:0] ta, logic [31:0] tb_, logic [31:0] tc,
                       logic to1, logic to2);
    a = ta; b = tb_; c = tc; op1 = to1; op2 = to2;
    @(posedge clk);
    exp_y = ref_add3(a, b, c, op1, op2);
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures <= 10)
        $display("FAIL a=%h b=%h c=%h op=%b%b y=%h expected=%h", a, b, c, op1, op2, y, exp_y);
    end
    // mechanism counters (only for the ordinary datapath)
    if (dut.is_nan || dut.pinf || dut.ninf) n_special++;
    else if (dut.d_mid >= 27) n_far++;
    else if (dut.cancel_xy) n_cancel++;
    else begin
      if (dut.neg) n_neg++;
      if (dut.seff_b && dut.seff_c) n_two_inv++;
      if (!dut.u_round.h_pre[21] && !dut.at_min && !dut.r_zero) n_lza_short++;
      if (dut.at_min && !dut.r_zero) n_at_min++;
      if (dut.u_round.inc) n_inc++;
      if (dut.u_round.v[24]) n_carry++;
      if (dut.r_ovf) n_ovf++;
      if (y[30:23] == 0 && y[22:0] != 0) n_sub_out++;
    end
  endtask

  initial begin
    repeat (5_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z, w;
    int base, mode;
    a = 0; b = 0; c = 0; op1 = 0; op2 = 0;
    @(posedge clk);
    // directed
    apply(32'h3F800000, 32'h3F800000, 32'h3F800000, 0, 0);   // 1+1+1 = 3
    apply(32'h3F800000, 32'h3F800000, 32'h3F800000, 1, 0);   // 1-1+1 = 1
    apply(32'h3F800000, 32'h3F800000, 32'h33800000, 1, 0);   // 1-1+2^-24
    apply(32'h4B800000, 32'h3F800000, 32'h3F000001, 0, 0);   // 2^24 + 1 + (0.5+)
    apply(32'h7F7FFFFF, 32'h7F7FFFFF, 32'h00000000, 0, 0);   // overflow
    apply(32'h00000001, 32'h00000001, 32'h80000001, 0, 0);   // subnormals
    apply(32'h80000000, 32'h00000000, 32'h80000000, 1, 0);   // -0 - +0 + -0 = -0
    apply(32'h7F800000, 32'h7F800000, 32'h3F800000, 1, 0);   // inf - inf = NaN
    apply(32'h3F800000, 32'h33000000, 32'h00000001, 1, 1);   // far case, power of 2
    apply(32'h4F000000, 32'h4F000000, 32'h2F000001, 1, 1);   // cancel, tiny third
    // random
    for (int n = 0; n < NRAND; n++) begin
      mode = int'($urandom_range(9));
      base = int'($urandom_range(254));
      case (mode)
        0: begin  // anywhere
             x = rand_fp(127, 127, 5); z = rand_fp(127, 127, 5); w = rand_fp(127, 127, 5);
           end
        1, 2: begin  // close exponents: cancellation
             x = rand_fp(base, 2, 2); z = rand_fp(base, 2, 2); w = rand_fp(base, 2, 2);
           end
        3: begin  // two nearly equal terms and a small third
             x = rand_fp(base, 0, 0); z = x ^ 32'(($urandom_range(3)) & 3);
             w = rand_fp(base - 20 - int'($urandom_range(40)), 3, 2);
           end
        4: begin  // exact cancellation and a third term below the window
             x = rand_fp(base, 0, 0); z = x ^ 32'h8000_0000;
             w = rand_fp(base - 20 - int'($urandom_range(60)), 3, 2);
           end
        5: begin  // middle term around the far threshold
             x = rand_fp(base, 0, 0);
             z = rand_fp(base - 24 - int'($urandom_range(6)), 0, 0);
             w = rand_fp(base - 24 - int'($urandom_range(40)), 3, 0);
           end
        6: begin  // rounding ties: c fills the bit just below the ulp
             x = rand_fp(base, 0, 0); z = rand_fp(base - int'($urandom_range(30)), 0, 0);
             w = x; w[30:23] = (x[30:23] > 24) ? x[30:23] - 8'd24 : 8'd0; w[22:0] = 0;
           end
        7: begin  // subnormal range
             x = rand_fp(2, 3, 10); z = rand_fp(2, 3, 10); w = rand_fp(2, 3, 10);
           end
        8: begin  // overflow range
             x = rand_fp(253, 2, 10); z = rand_fp(253, 2, 10); w = rand_fp(253, 2, 10);
           end
        default: begin  // shuffled positions of mode 3 / 4
             x = rand_fp(base, 0, 0); w = x ^ 32'h8000_0000;
             z = rand_fp(base - int'($urandom_range(60)), 3, 2);
           end
      endcase
      apply(x, z, w, 1'($urandom), 1'($urandom));
    end

    $display("mechanisms: neg=%0d two_inv=%0d lza_short=%0d at_min=%0d round_up=%0d carry=%0d far=%0d cancel=%0d ovf=%0d special=%0d subnormal_out=%0d",
             n_neg, n_two_inv, n_lza_short, n_at_min, n_inc, n_carry, n_far, n_cancel, n_ovf, n_special, n_sub_out);
    if (n_neg == 0)       begin failures++; $display("never: negative sum"); end
    if (n_two_inv == 0)   begin failures++; $display("never: two inverted terms"); end
    if (n_lza_short == 0) begin failures++; $display("never: LZA one short"); end
    if (n_at_min == 0)    begin failures++; $display("never: subnormal shift limit"); end
    if (n_inc == 0)       begin failures++; $display("never: round up"); end
    if (n_carry == 0)     begin failures++; $display("never: significand carry-out"); end
    if (n_far == 0)       begin failures++; $display("never: far case"); end
    if (n_cancel == 0)    begin failures++; $display("never: exact cancellation"); end
    if (n_ovf == 0)       begin failures++; $display("never: overflow"); end
    if (n_special == 0)   begin failures++; $display("never: NaN/infinity"); end
    if (n_sub_out == 0)   begin failures++; $display("never: subnormal result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
