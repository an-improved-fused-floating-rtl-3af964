// fp3_exp_align: exponent compare and significand alignment.
//
// Following the document, all six exponent differences (a-b, b-a, b-c, c-b,
// a-c, c-a) are computed in parallel. The borrow of each subtraction gives the
// pairwise comparison, which both picks the largest exponent and selects, in
// each pair, the difference that is non-negative, so no complementation is
// needed after the subtractions. Each significand is then shifted right by its
// distance from the largest exponent (fp3_align_shift).
//
// Subnormal inputs use an effective exponent of 1 and a hidden bit of 0.
// Beyond the document, the block also reports which operand has the largest
// and which the middle exponent and the distance of the middle one
// (d_mid); the top uses these for the far-operand and exact-cancellation
// shortcuts. Ties are broken in the order a, b, c. Combinational.
module fp3_exp_align
  import fp3_pkg::*;
(
  input  logic [EXP_W-1:0]  exp_a, exp_b, exp_c,
  input  logic [FRAC_W-1:0] frac_a, frac_b, frac_c,
  output logic [EXP_W-1:0]  emax,     // largest effective exponent
  output logic [1:0]        idx_max,  // 0 = a, 1 = b, 2 = c
  output logic [1:0]        idx_mid,
  output logic [1:0]        idx_min,
  output logic [EXP_W:0]    d_mid,    // emax minus the middle exponent
  output win_t              mag_a, mag_b, mag_c
);
  logic [EXP_W-1:0] ea, eb, ec;
  logic [SIG_W-1:0] sa, sb, sc;
  // six subtractors, one bit wider for the borrow
  logic [EXP_W:0] d_ab, d_ba, d_bc, d_cb, d_ac, d_ca;
  logic a_ge_b, b_ge_c, a_ge_c;
  logic [EXP_W:0] abs_ab, abs_bc, abs_ac;
  logic [EXP_W:0] sh_a, sh_b, sh_c;

  always_comb begin
    ea = (exp_a == '0) ? EXP_W'(1) : exp_a;
    eb = (exp_b == '0) ? EXP_W'(1) : exp_b;
    ec = (exp_c == '0) ? EXP_W'(1) : exp_c;
    sa = {exp_a != '0, frac_a};
    sb = {exp_b != '0, frac_b};
    sc = {exp_c != '0, frac_c};

    d_ab = {1'b0, ea} - {1'b0, eb};
    d_ba = {1'b0, eb} - {1'b0, ea};
    d_bc = {1'b0, eb} - {1'b0, ec};
    d_cb = {1'b0, ec} - {1'b0, eb};
    d_ac = {1'b0, ea} - {1'b0, ec};
    d_ca = {1'b0, ec} - {1'b0, ea};

    a_ge_b = ~d_ab[EXP_W];
    b_ge_c = ~d_bc[EXP_W];
    a_ge_c = ~d_ac[EXP_W];

    abs_ab = a_ge_b ? d_ab : d_ba;
    abs_bc = b_ge_c ? d_bc : d_cb;
    abs_ac = a_ge_c ? d_ac : d_ca;

    if (a_ge_b && a_ge_c) begin
      idx_max = 2'd0; emax = ea;
      sh_a = '0; sh_b = abs_ab; sh_c = abs_ac;
    end else if (!a_ge_b && b_ge_c) begin
      idx_max = 2'd1; emax = eb;
      sh_a = abs_ab; sh_b = '0; sh_c = abs_bc;
    end else begin
      idx_max = 2'd2; emax = ec;
      sh_a = abs_ac; sh_b = abs_bc; sh_c = '0;
    end

    // order the two remaining operands
    unique case (idx_max)
      2'd0:    begin
                 idx_mid = b_ge_c ? 2'd1 : 2'd2;
                 idx_min = b_ge_c ? 2'd2 : 2'd1;
                 d_mid   = b_ge_c ? sh_b : sh_c;
               end
      2'd1:    begin
                 idx_mid = a_ge_c ? 2'd0 : 2'd2;
                 idx_min = a_ge_c ? 2'd2 : 2'd0;
                 d_mid   = a_ge_c ? sh_a : sh_c;
               end
      default: begin
                 idx_mid = a_ge_b ? 2'd0 : 2'd1;
                 idx_min = a_ge_b ? 2'd1 : 2'd0;
                 d_mid   = a_ge_b ? sh_a : sh_b;
               end
    endcase
  end

  fp3_align_shift u_al_a (.sig(sa), .shamt(sh_a), .mag(mag_a));
  fp3_align_shift u_al_b (.sig(sb), .shamt(sh_b), .mag(mag_b));
  fp3_align_shift u_al_c (.sig(sc), .shamt(sh_c), .mag(mag_c));
endmodule
