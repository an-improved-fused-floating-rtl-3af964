// fp3_lza3: three-input leading-zero anticipator.
//
// Predicts the number of leading zeros of x + y + z (WIN_W-bit two's
// complement, known to be non-negative because the significand comparison
// has already chosen the +S or -S terms) without waiting for the addition.
//
// Pre-encoding: per bit, the three inputs are encoded into a transfer
// t_i = s_i ^ k_i and a kill z_i = ~s_i & ~k_i, where s_i / k_i are the
// bit's sum and incoming carry-save digits (the 3:2 encoding folded into the
// indicator logic). The indicator for a non-negative result is
// f_i = t_i ^ ~z_(i-1), with ~z_(-1) = 1.
// LZD: a priority encoder returns the position of the leading one of f.
// The count is exact or one too small, never too large, so normalizing by it
// never shifts a significant bit out; the rounding stage absorbs the
// one-bit error. The document gives only the two-part structure
// (pre-encoding, LZD); the indicator equations are this design's.
// Combinational.
module fp3_lza3
  import fp3_pkg::*;
(
  input  win_t             x, y, z,
  output logic [LZC_W-1:0] cnt
);
  win_t s, k, t, kill, f;

  always_comb begin
    s    = x ^ y ^ z;
    k    = ((x & y) | (x & z) | (y & z)) << 1;
    t    = s ^ k;
    kill = ~s & ~k;
    f    = t ^ ~{kill[WIN_W-2:0], 1'b0};
    // leading-zero detection
    cnt = LZC_W'(WIN_W);
    for (int i = 0; i < WIN_W; i++) begin
      if (f[i]) cnt = LZC_W'(WIN_W - 1 - i);
    end
  end
endmodule
