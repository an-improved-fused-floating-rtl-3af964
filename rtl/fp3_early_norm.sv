// fp3_early_norm: early normalization of the sum/carry pair.
//
// Shifts both vectors of the selected (non-negative) carry-save pair left by
// the LZA count before they are added, so that the leading one of their sum
// lands in window bit WIN_W-1, or in WIN_W-2 when the LZA count is one short.
// The sum of the pair is unchanged modulo 2^WIN_W, which is all that matters
// since the true sum has at least that many leading zeros.
//
// The shift is limited to emax + 2, the shift at which a leading one in bit
// WIN_W-1 has biased exponent 1; beyond it the result is subnormal and keeps
// the smallest exponent. `at_min` reports that the limit was taken.
// The limit is this design's addition for subnormal results. Combinational.
module fp3_early_norm
  import fp3_pkg::*;
(
  input  win_t             s_in,
  input  win_t             c_in,
  input  logic [LZC_W-1:0] cnt,
  input  logic [EXP_W-1:0] emax,     // effective exponent of largest operand
  output win_t             s_out,
  output win_t             c_out,
  output logic [LZC_W-1:0] shift,
  output logic             at_min
);
  logic [EXP_W+1:0] kmax;

  always_comb begin
    kmax   = (EXP_W+2)'(emax) + (EXP_W+2)'(2);
    at_min = ((EXP_W+2)'(cnt) >= kmax);
    shift  = at_min ? LZC_W'(kmax) : cnt;
    s_out  = s_in << shift;
    c_out  = c_in << shift;
  end
endmodule
