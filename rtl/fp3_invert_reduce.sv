// fp3_invert_reduce: conditional inversion and dual 3:2 reduction.
//
// The aligned magnitudes are bitwise inverted according to the effective
// signs. Instead of an incrementer after each inverter, the number of
// inverted terms (1 or 2) is written into the two zero LSB extension bits of
// a term that is not inverted, as the document describes, so the three terms
// sum exactly to the signed significand sum.
//
// Two such term sets are formed and each is reduced by a 3:2 carry-save
// adder into a sum/carry pair:
//   pos: A kept, B and C inverted where seff_b / seff_c are set  ->  +S
//   neg: every inversion flipped                                 ->  -S
// The significand comparison later picks the pair whose sum is not negative,
// so no complementation is needed after the addition. (How the document's
// dual reduction is organised inside is not given; this pairing is this
// design's reading of it.) When B and C are both added (S >= 0 always) the
// neg set would need three corrections; it is never selected then and its
// correction is left out. Combinational.
module fp3_invert_reduce
  import fp3_pkg::*;
(
  input  win_t mag_a, mag_b, mag_c,
  input  logic seff_b, seff_c,
  output win_t pos_t [3],   // the three terms of +S (for the LZA)
  output win_t neg_t [3],   // the three terms of -S
  output win_t pos_s, pos_c,
  output win_t neg_s, neg_c
);
  logic [1:0] n_pos, n_neg;

  always_comb begin
    n_pos = 2'(seff_b) + 2'(seff_c);
    n_neg = 2'd1 + 2'(!seff_b) + 2'(!seff_c);

    pos_t[0] = mag_a | win_t'(n_pos);
    pos_t[1] = seff_b ? ~mag_b : mag_b;
    pos_t[2] = seff_c ? ~mag_c : mag_c;

    neg_t[0] = ~mag_a;
    neg_t[1] = seff_b ? mag_b : ~mag_b;
    neg_t[2] = seff_c ? mag_c : ~mag_c;
    if (seff_b)      neg_t[1] = neg_t[1] | win_t'(n_neg);
    else if (seff_c) neg_t[2] = neg_t[2] | win_t'(n_neg);

    pos_s = pos_t[0] ^ pos_t[1] ^ pos_t[2];
    pos_c = ((pos_t[0] & pos_t[1]) | (pos_t[0] & pos_t[2]) | (pos_t[1] & pos_t[2])) << 1;
    neg_s = neg_t[0] ^ neg_t[1] ^ neg_t[2];
    neg_c = ((neg_t[0] & neg_t[1]) | (neg_t[0] & neg_t[2]) | (neg_t[1] & neg_t[2])) << 1;
  end
endmodule
