// fp3_ref_pkg: reference model for the testbenches.
//
// ref_add3 returns the correctly rounded (round to nearest, ties to even)
// single-precision value of a op1 b op2 c, computed from the exact sum held
// as a 300-bit integer in units of 2^-149 (the smallest subnormal), so it
// shares nothing with the hardware's windowed datapath.
// Also holds exact-value helpers and random-operand generators that aim at
// the hard cases.
package fp3_ref_pkg;

  typedef logic signed [299:0] big_t;

  function automatic logic [31:0] ref_add3(logic [31:0] a, logic [31:0] b,
                                           logic [31:0] c, logic op1, logic op2);
    logic [31:0] v [3];
    logic        s [3];
    logic        nan, pinf, ninf, allneg;
    big_t        acc, term, mag;
    int          p, sh, e;
    logic [299:0] sig;
    logic        r, st, neg;
    v[0] = a; v[1] = b; v[2] = c;
    s[0] = a[31]; s[1] = b[31] ^ op1; s[2] = c[31] ^ op2;
    nan = 0; pinf = 0; ninf = 0;
    for (int i = 0; i < 3; i++) begin
      if (v[i][30:23] == 8'hFF) begin
        if (v[i][22:0] != 0) nan = 1;
        else if (s[i]) ninf = 1;
        else pinf = 1;
      end
    end
    if (nan || (pinf && ninf)) return 32'h7FC0_0000;
    if (pinf) return 32'h7F80_0000;
    if (ninf) return 32'hFF80_0000;
    acc = 0;
    for (int i = 0; i < 3; i++) begin
      term = big_t'({(v[i][30:23] != 0), v[i][22:0]});
      e = (v[i][30:23] == 0) ? 1 : int'(v[i][30:23]);
      term = term <<< (e - 1);
      acc = s[i] ? acc - term : acc + term;
    end
    allneg = s[0] & s[1] & s[2];
    if (acc == 0) return {allneg, 31'h0};
    neg = acc < 0;
    mag = neg ? -acc : acc;
    p = 0;
    for (int i = 0; i < 300; i++) if (mag[i]) p = i;
    if (p <= 23) return {neg, 31'(mag)};
    sh  = p - 23;
    sig = 300'(mag >> sh);
    r   = mag[sh-1];
    st  = 0;
    for (int i = 0; i < sh - 1; i++) st |= mag[i];
    if (r && (st || sig[0])) sig = sig + 1;
    if (sig[24]) begin sig = sig >> 1; sh = sh + 1; end
    e = sh + 1;
    if (e >= 255) return {neg, 8'hFF, 23'h0};
    return {neg, 8'(e), sig[22:0]};
  endfunction

  // exact value of a finite binary32 number in units of 2^-149
  function automatic big_t to_big(logic [31:0] x);
    big_t m;
    int   e;
    m = big_t'({(x[30:23] != 0), x[22:0]});
    e = (x[30:23] == 0) ? 1 : int'(x[30:23]);
    m = m <<< (e - 1);
    return x[31] ? -m : m;
  endfunction

  // exact a op1 b op2 c of finite operands, in units of 2^-149
  function automatic big_t exact3(logic [31:0] a, logic [31:0] b, logic [31:0] c,
                                  logic op1, logic op2);
    return to_big(a) + (op1 ? -to_big(b) : to_big(b)) + (op2 ? -to_big(c) : to_big(c));
  endfunction

  // random operand with exponent near `base` (or anywhere), with occasional
  // zeros, subnormals, infinities and NaNs
  function automatic logic [31:0] rand_fp(int base, int spread, int special_pct);
    int e, k;
    logic [31:0] x;
    k = int'($urandom_range(99));
    x[31] = 1'($urandom);
    x[22:0] = 23'($urandom);
    case ($urandom_range(7))
      0: x[22:0] = 23'h7FFFFF;
      1: x[22:0] = 23'h0;
      2: x[22:0] = 23'($urandom) & 23'h7FF800;
      default: ;
    endcase
    e = base + int'($urandom_range(2 * spread)) - spread;
    if (e < 0) e = 0;
    if (e > 254) e = 254;
    x[30:23] = 8'(e);
    if (k < special_pct) begin
      case ($urandom_range(4))
        0: x[30:0] = 31'h0;
        1: x[30:23] = 8'h00;
        2: begin x[30:23] = 8'hFF; x[22:0] = 23'h0; end
        3: begin x[30:23] = 8'hFF; x[22:0] = 23'($urandom) | 23'h1; end
        default: x[30:23] = 8'hFE;
      endcase
    end
    return x;
  endfunction

endpackage
