// fp3_adder: fused single-precision floating-point three-term adder.
//
// Computes y = round(a op1 b op2 c) with a single round-to-nearest-even step
// (op = 0 adds, op = 1 subtracts), instead of rounding after each of two
// two-term additions. The datapath follows the document's improved
// architecture:
//   sign logic -> exponent compare (six subtractions) and alignment ->
//   invert and dual 3:2 reduction (+S and -S pairs) -> significand
//   comparison picks the non-negative pair -> three-input LZA ->
//   early normalization of the pair -> compound (sum, sum+1) Brent-Kung
//   addition of the upper f+1 bits with rounding from the lower bits.
//
// Around that datapath this module adds what the document does not discuss:
//   * NaN and infinity inputs (NaN in, or +inf with -inf, gives the quiet
//     NaN 0x7FC00000; otherwise an infinity passes through), overflow to
//     infinity;
//   * far case: when the middle exponent is FAR_SHIFT or more below the
//     largest, the two smaller terms together stay below a quarter ulp of
//     the largest, and the result is the largest operand unchanged;
//   * exact cancellation of the two largest-exponent terms: the result is the
//     third operand, exact (this keeps results correct when the third term
//     lies below the window);
//   * exact zero results are +0, or -0 when all three terms are -0.
// With these the result equals the correctly rounded exact sum for all
// inputs. There are no status flags and no other rounding modes.
// Purely combinational: no clock, no latency in cycles.
module fp3_adder
  import fp3_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic [31:0] c,
  input  logic        op1,   // 0: a + b, 1: a - b
  input  logic        op2,   // 0: ... + c, 1: ... - c
  output logic [31:0] y
);
  fp32_t fa, fb, fc;
  logic  seff_a, seff_b, seff_c, tsign_b, tsign_c;

  logic [EXP_W-1:0] emax;
  logic [1:0]       idx_max, idx_mid, idx_min;
  logic [EXP_W:0]   d_mid;
  win_t             mag_a, mag_b, mag_c;

  win_t pos_t [3];
  win_t neg_t [3];
  win_t pos_s, pos_c, neg_s, neg_c;
  logic neg;

  win_t sel_t [3];
  win_t sel_s, sel_c;
  logic [LZC_W-1:0] lz_cnt, shift;
  win_t n_s, n_c;
  logic at_min;

  logic [EXP_W-1:0]  r_exp;
  logic [FRAC_W-1:0] r_frac;
  logic r_ovf, r_zero;

  assign fa = a;
  assign fb = b;
  assign fc = c;

  fp3_sign_logic u_sign (
    .sign_a(fa.sign), .sign_b(fb.sign), .sign_c(fc.sign), .op1(op1), .op2(op2),
    .seff_a(seff_a), .seff_b(seff_b), .seff_c(seff_c),
    .tsign_b(tsign_b), .tsign_c(tsign_c)
  );

  fp3_exp_align u_align (
    .exp_a(fa.exp), .exp_b(fb.exp), .exp_c(fc.exp),
    .frac_a(fa.frac), .frac_b(fb.frac), .frac_c(fc.frac),
    .emax(emax), .idx_max(idx_max), .idx_mid(idx_mid), .idx_min(idx_min),
    .d_mid(d_mid), .mag_a(mag_a), .mag_b(mag_b), .mag_c(mag_c)
  );

  fp3_invert_reduce u_inv (
    .mag_a(mag_a), .mag_b(mag_b), .mag_c(mag_c), .seff_b(seff_b), .seff_c(seff_c),
    .pos_t(pos_t), .neg_t(neg_t), .pos_s(pos_s), .pos_c(pos_c),
    .neg_s(neg_s), .neg_c(neg_c)
  );

  fp3_sig_compare u_cmp (.s(pos_s), .c(pos_c), .neg(neg));

  always_comb begin
    sel_t = neg ? neg_t : pos_t;
    sel_s = neg ? neg_s : pos_s;
    sel_c = neg ? neg_c : pos_c;
  end

  fp3_lza3 u_lza (.x(sel_t[0]), .y(sel_t[1]), .z(sel_t[2]), .cnt(lz_cnt));

  fp3_early_norm u_norm (
    .s_in(sel_s), .c_in(sel_c), .cnt(lz_cnt), .emax(emax),
    .s_out(n_s), .c_out(n_c), .shift(shift), .at_min(at_min)
  );

  fp3_round_add u_round (
    .s_in(n_s), .c_in(n_c), .emax(emax), .shift(shift), .at_min(at_min),
    .exp_out(r_exp), .frac_out(r_frac), .overflow(r_ovf), .zero(r_zero)
  );

  // ---------------------------------------------------------------- result
  fp32_t op [3];      // operands with their true (post-op) signs
  logic  is_nan, pinf, ninf;
  logic  cancel_xy;
  logic  r_sign;

  always_comb begin
    op[0] = fa;
    op[1] = '{sign: tsign_b, exp: fb.exp, frac: fb.frac};
    op[2] = '{sign: tsign_c, exp: fc.exp, frac: fc.frac};

    is_nan = 1'b0; pinf = 1'b0; ninf = 1'b0;
    for (int i = 0; i < 3; i++) begin
      if (op[i].exp == '1) begin
        if (op[i].frac != '0) is_nan = 1'b1;
        else if (op[i].sign)  ninf   = 1'b1;
        else                  pinf   = 1'b1;
      end
    end

    cancel_xy = (op[idx_max].exp == op[idx_mid].exp) &&
                (op[idx_max].frac == op[idx_mid].frac) &&
                (op[idx_max].sign != op[idx_mid].sign);

    r_sign = seff_a ^ neg;

    if (is_nan || (pinf && ninf))           y = QNAN;
    else if (pinf)                          y = 32'h7F80_0000;
    else if (ninf)                          y = 32'hFF80_0000;
    else if (d_mid >= (EXP_W+1)'(FAR_SHIFT)) y = op[idx_max];
    else if (cancel_xy)
      y = ({op[idx_min].exp, op[idx_min].frac} == '0) ? 32'h0 : op[idx_min];
    else if (r_zero)
      y = {fa.sign & tsign_b & tsign_c, 31'h0};
    else if (r_ovf)                         y = {r_sign, 8'hFF, 23'h0};
    else                                    y = {r_sign, r_exp, r_frac};
  end
endmodule
