// tb_fp3_round_add: compound addition and rounding.
// Builds a non-negative window value V whose leading one is in bit 56 or 55
// (or lower, for the subnormal limit), splits it into a random sum/carry
// pair and picks emax/shift so the exponent is known. The expected result
// is V rounded to nearest-even at the position implied by the leading one,
// computed with integer division, with carry-out renormalization, the
// subnormal encoding and overflow.
`timescale 1ns/1ps
module tb_fp3_round_add;
  import fp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  win_t s, c;
  logic [EXP_W-1:0] emax, eo;
  logic [LZC_W-1:0] shift;
  logic at_min, ovf, zero;
  logic [FRAC_W-1:0] fo;
  int checks = 0, failures = 0, n_up = 0, n_tie = 0, n_carry = 0, n_sub = 0;

  fp3_round_add dut (.s_in(s), .c_in(c), .emax(emax), .shift(shift), .at_min(at_min),
                     .exp_out(eo), .frac_out(fo), .overflow(ovf), .zero(zero));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] v, q, rem, half, unit;
    int lead, pos, e_exp, sh;
    for (int n = 0; n < 30000; n++) begin
      sh   = int'($urandom_range(0, 57));
      emax = EXP_W'($urandom_range(1, 254));
      if (n % 4 == 0) begin
        // subnormal limit: shift = emax + 2
        emax = EXP_W'($urandom_range(1, 50));
        sh = int'(emax) + 2;
        if (sh > 57) sh = 57;
        emax = EXP_W'(sh - 2);
        at_min = 1;
        lead = 56 - int'($urandom_range(0, 40));
      end else begin
        at_min = 0;
        lead = 56 - int'($urandom_range(0, 1));
        if (int'(emax) + 2 <= sh) emax = EXP_W'(sh - 1);
      end
      shift = LZC_W'(sh);
      v = {$urandom, $urandom} & ((64'd1 << lead) - 1);
      v[lead] = 1'b1;
      case (n % 3)
        0: v[30:0] = 0;                       // ties and exact values
        1: v[31:0] = {1'b1, 31'd0};
        default: ;
      endcase
      if (n % 7 == 0) v = v | (((64'd1 << 26) - 1) << (lead - 25));  // all ones: carry-out
      s = win_t'({$urandom, $urandom});
      c = win_t'(v) - s;
      @(posedge clk);
      // expected
      pos   = (lead == 56 || at_min) ? 33 : 32;      // weight of the result LSB
      unit  = 64'd1 << pos;
      q     = v / unit;
      rem   = v % unit;
      half  = unit / 2;
      if (rem > half || (rem == half && q[0])) begin q = q + 1; n_up++; end
      if (rem == half) n_tie++;
      if (lead == 56 || !at_min) e_exp = int'(emax) + ((lead == 56) ? 3 : 2) - sh;
      else e_exp = 0;
      if (q[24]) begin q = q >> 1; e_exp++; n_carry++; end
      else if (e_exp == 0 && q[23]) e_exp = 1;
      if (e_exp == 0) n_sub++;
      checks++;
      if (e_exp >= 255) begin
        if (!ovf) begin failures++; $display("FAIL overflow missing"); end
      end else if (q == 0) begin
        if (!zero) begin failures++; $display("FAIL zero missing"); end
      end else if (ovf || zero || int'(eo) != e_exp || fo !== q[22:0]) begin
        failures++;
        if (failures < 10) $display("FAIL v=%h lead=%0d sh=%0d emax=%0d got e=%0d f=%h exp e=%0d f=%h",
                                    v, lead, sh, emax, eo, fo, e_exp, q[22:0]);
      end
    end
    $display("round_up=%0d ties=%0d carry=%0d subnormal=%0d", n_up, n_tie, n_carry, n_sub);
    if (n_up == 0 || n_tie == 0 || n_carry == 0 || n_sub == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
