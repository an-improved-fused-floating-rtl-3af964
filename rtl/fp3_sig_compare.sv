// fp3_sig_compare: significand comparison.
//
// Decides whether the signed three-term significand sum (held as the sum /
// carry pair of the +S reduction) is negative, i.e. whether the inverted
// terms outweigh the others. The document names this function but does not
// give its circuit; here it is the sign (top bit) of the pair's sum,
// produced by the carry network of a Brent-Kung adder over the window
// (synthesis keeps only the logic feeding that bit). `neg` selects the -S
// pair and flips the result sign. Combinational.
module fp3_sig_compare
  import fp3_pkg::*;
(
  input  win_t s,
  input  win_t c,
  output logic neg
);
  win_t sum, sum_p1;
  logic cout, cout_p1;

  fp3_bk_adder #(.WIDTH(WIN_W)) u_cmp (
    .a(s), .b(c), .sum(sum), .sum_p1(sum_p1), .cout(cout), .cout_p1(cout_p1)
  );

  assign neg = sum[WIN_W-1];
endmodule
