// fp3_align_shift: alignment shifter for one significand.
//
// Places the 24-bit significand at window bits [53:30] and shifts it right by
// `shamt` positions. Bits that fall below window bit 3 are ORed into the
// sticky bit (window bit 2); the two extension bits [1:0] are left zero.
// Shift amounts of 63 and above saturate (the whole significand becomes
// sticky). The document specifies right-shift alignment; the sticky bit and
// its placement below the guard bits are this design's choice. Combinational.
module fp3_align_shift
  import fp3_pkg::*;
(
  input  logic [SIG_W-1:0] sig,
  input  logic [EXP_W:0]   shamt,
  output win_t             mag
);
  logic [WIN_W+63:0] wide;
  logic [5:0]        sh;

  always_comb begin
    sh   = (shamt > 9'd63) ? 6'd63 : shamt[5:0];
    wide = {3'b000, sig, {XLSB_POS{1'b0}}, 64'd0} >> sh;
    mag  = {wide[WIN_W+63:64+STICKY_POS+1],
            (|wide[64+STICKY_POS:0]),
            {EXT_W{1'b0}}};
  end
endmodule
