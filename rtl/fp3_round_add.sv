// fp3_round_add: compound significand addition and round-to-nearest-even.
//
// The normalized pair (leading one of its sum in window bit 56, or 55 when
// the LZA count was one short) is split as in the document: the upper f+1 =
// 25 bits form the significand and round position, the lower LO_W = 32 bits
// only feed rounding. Addition and rounding run in parallel:
//
//  * Compound adder: a Brent-Kung compound adder adds the top CMP_W = 22
//    bits of the pair and gives H and H+1 at once (with the carry out of H+1
//    for a rounding overflow).
//  * Rounding logic: a Brent-Kung adder adds the lower 32 bits (carry c1,
//    round and sticky bits). A 4-bit adder adds the three upper LSBs and c1.
//    It then decides the rounding and adds the increment (1 at bit 32, or 2
//    when the leading one is in bit 56 and the LSB is bit 33). Out come the
//    result's three LSBs and one carry, which selects H or H+1.
//  * Single carry: before this, two half-adder rows act on window bits 32 and
//    up. The first starts at bit 32, the second at bit 33. Afterwards the
//    carry vector is zero in bits 32 and 33 and at most 1 in the 3-bit field,
//    so the pre-round sum plus the increment stays below 16. The carry into
//    the compound part is therefore 0 or 1, and sum / sum+1 is enough.
//  * Selection: the pre-round carry picks the leading-one position (bit 24 of
//    the upper part or not). With it in bit 24 the significand is the upper
//    part shifted right by one. A carry out of the rounded significand shifts
//    it right again and increments the exponent. Subnormal results (at_min
//    with bit 24 clear) use the bit-24 alignment and exponent field 0. They
//    become exponent 1 if rounding reaches the hidden bit.
//
// Outputs: packed exponent and fraction, overflow (exponent >= 255) and
// zero. The half-adder rows and the exact field widths are this design's
// choices; the document gives the split and the sum / sum+1 selection.
// Combinational.
module fp3_round_add
  import fp3_pkg::*;
(
  input  win_t              s_in,
  input  win_t              c_in,
  input  logic [EXP_W-1:0]  emax,
  input  logic [LZC_W-1:0]  shift,
  input  logic              at_min,
  output logic [EXP_W-1:0]  exp_out,
  output logic [FRAC_W-1:0] frac_out,
  output logic              overflow,
  output logic              zero
);
  localparam int unsigned HI_W = WIN_W - LO_W;        // 25 bits from bit 32 up

  logic [HI_W-1:0]  s1, c1v, s2, c2v;                 // after half-adder rows
  logic [LO_W-1:0]  lo_sum, lo_sum_p1;
  logic             lo_cout, lo_cout_p1;
  logic [CMP_W-1:0] h0, h1;
  logic             h_cout, h_cout_p1;
  logic [RND_W:0]   t_pre, t_rnd;
  logic             hi, rnd, stk, lsb, inc;
  logic [CMP_W-1:0] h_pre, h_sel;
  logic             h_sel_ovf;
  logic [UP_W:0]    v;                                 // rounded upper part, 26 bits
  logic [SIG_W-1:0] sig;
  logic [EXP_W+2:0] e;

  // two half-adder rows: free carry slots at window bits 32 and 33
  always_comb begin
    s1  = s_in[WIN_W-1:LO_W] ^ c_in[WIN_W-1:LO_W];
    c1v = {s_in[WIN_W-2:LO_W] & c_in[WIN_W-2:LO_W], 1'b0};
    s2  = {s1[HI_W-1:1] ^ c1v[HI_W-1:1], s1[0]};
    c2v = {s1[HI_W-2:1] & c1v[HI_W-2:1], 1'b0, c1v[0]};
  end

  // lower part: carry, round and sticky
  fp3_bk_adder #(.WIDTH(LO_W)) u_lo (
    .a(s_in[LO_W-1:0]), .b(c_in[LO_W-1:0]),
    .sum(lo_sum), .sum_p1(lo_sum_p1), .cout(lo_cout), .cout_p1(lo_cout_p1)
  );

  // compound adder on the upper part without its three LSBs
  fp3_bk_adder #(.WIDTH(CMP_W)) u_cmp (
    .a(s2[HI_W-1:RND_W]), .b(c2v[HI_W-1:RND_W]),
    .sum(h0), .sum_p1(h1), .cout(h_cout), .cout_p1(h_cout_p1)
  );

  always_comb begin
    // three LSBs of the upper part plus the lower carry, before rounding
    t_pre = (RND_W+1)'(s2[RND_W-1:0]) + (RND_W+1)'(c2v[RND_W-1:0]) + (RND_W+1)'(lo_cout);
    h_pre = t_pre[RND_W] ? h1 : h0;
    hi    = h_pre[CMP_W-1] | at_min;
    if (hi) begin
      lsb = t_pre[1];
      rnd = t_pre[0];
      stk = |lo_sum;
    end else begin
      lsb = t_pre[0];
      rnd = lo_sum[LO_W-1];
      stk = |lo_sum[LO_W-2:0];
    end
    inc   = rnd & (stk | lsb);
    // round decision: add the increment to the three LSBs; one carry at most
    t_rnd = t_pre + (inc ? (hi ? (RND_W+1)'(2) : (RND_W+1)'(1)) : '0);
    h_sel     = t_rnd[RND_W] ? h1 : h0;
    // only the rounding carry can overflow H (a pre-round wrap is modulo 2^57)
    h_sel_ovf = t_rnd[RND_W] & ~t_pre[RND_W] & (&h0);
    v = {h_sel_ovf, h_sel, t_rnd[RND_W-1:0]};
    if (hi) v = v >> 1;

    // exponent of a leading one in upper bit 24 (hi) or 23
    if (hi) e = h_pre[CMP_W-1] ? (EXP_W+3)'(emax) + 3 - (EXP_W+3)'(shift) : '0;
    else    e = (EXP_W+3)'(emax) + 2 - (EXP_W+3)'(shift);

    if (v[SIG_W]) begin                 // rounding carried out of the significand
      sig = v[SIG_W:1];
      e   = e + 1;
    end else begin
      sig = v[SIG_W-1:0];
      if (e == '0 && sig[SIG_W-1]) e = (EXP_W+3)'(1);  // subnormal rounded up
    end

    zero     = (sig == '0);
    overflow = (e >= (EXP_W+3)'(255));
    exp_out  = e[EXP_W-1:0];
    frac_out = sig[FRAC_W-1:0];
  end
endmodule
