// fp3_pkg: formats and datapath constants shared by the fused three-term
// floating-point adder.
//
// The operands are IEEE 754 single precision (f = 24 significand bits with the
// hidden one). All three aligned significands live in one two's-complement
// window of WIN_W bits, laid out from the least significant end as:
//
//   [1:0]   two LSB extension bits; they carry the +1 (or +2) that turns the
//           one's complement of an inverted significand into its negation
//   [2]     sticky bit: OR of everything shifted out below the window
//   [29:3]  27 guard bits below the LSB of the largest-exponent operand
//   [53:30] significand of the operand with the largest exponent
//   [55:54] headroom for the carries of a three-term sum
//   [56]    sign of the two's-complement sum
//
// The single-precision format follows the document; the window size and
// layout are this design's choice (27 guard bits keep the second operand
// exactly whenever it can influence the rounded result, see README).
package fp3_pkg;

  localparam int unsigned EXP_W   = 8;
  localparam int unsigned FRAC_W  = 23;
  localparam int unsigned SIG_W   = FRAC_W + 1;     // f
  localparam int unsigned GUARD_W = 27;
  localparam int unsigned EXT_W   = 2;
  localparam int unsigned STICKY_POS = EXT_W;                       // 2
  localparam int unsigned XLSB_POS   = EXT_W + 1 + GUARD_W;         // 30
  localparam int unsigned WIN_W   = XLSB_POS + SIG_W + 3;           // 57
  localparam int unsigned LZC_W   = 6;              // counts 0..WIN_W
  // second-largest operand this far below the largest cannot change the result
  localparam int unsigned FAR_SHIFT = GUARD_W;
  // split of the normalized pair: upper f+1 bits go to the compound adder
  localparam int unsigned UP_W    = SIG_W + 1;      // 25
  localparam int unsigned LO_W    = WIN_W - UP_W;   // 32
  // the compound adder takes the upper part minus its three LSBs, which the
  // rounding logic produces
  localparam int unsigned RND_W   = 3;
  localparam int unsigned CMP_W   = UP_W - RND_W;   // 22

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  typedef struct packed {
    logic              sign;
    logic [EXP_W-1:0]  exp;
    logic [FRAC_W-1:0] frac;
  } fp32_t;

  typedef logic [WIN_W-1:0] win_t;

endpackage
