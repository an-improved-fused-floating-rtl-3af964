// fp3_bk_adder: Brent-Kung parallel-prefix compound adder.
//
// Computes sum = a + b and sum_p1 = a + b + 1 (both modulo 2^WIDTH) with
// their carry-outs, from one shared prefix tree. Bit generate/propagate
// signals are combined in the Brent-Kung pattern: an up-sweep builds group
// terms over blocks of 2, 4, 8, ... bits at positions 2^k-1, then a down-sweep
// fills in the remaining positions, giving about 2*log2(WIDTH) levels and
// about 2*WIDTH prefix cells (fewer cells and wires than Kogge-Stone, which the
// document replaces with this adder). With group terms G[i] = G(i:0) and
// P[i] = P(i:0), the carry into bit i is G[i-1] for the plain sum and
// G[i-1] | P[i-1] for sum+1 -- the compound form used for rounding.
// Combinational; any WIDTH >= 2.
module fp3_bk_adder #(
  parameter int unsigned WIDTH = 25
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  output logic [WIDTH-1:0] sum,
  output logic [WIDTH-1:0] sum_p1,
  output logic             cout,
  output logic             cout_p1
);
  localparam int unsigned S0 = (WIDTH > 2) ? (1 << ($clog2(WIDTH) - 2)) : 1;

  logic [WIDTH-1:0] p, gg, pp;

  always_comb begin
    p  = a ^ b;
    gg = a & b;
    pp = p;
    // up-sweep
    for (int unsigned s = 1; s < WIDTH; s = s * 2) begin
      for (int unsigned i = 2 * s - 1; i < WIDTH; i = i + 2 * s) begin
        gg[i] = gg[i] | (pp[i] & gg[i - s]);
        pp[i] = pp[i] & pp[i - s];
      end
    end
    // down-sweep
    for (int unsigned s = S0; s >= 1; s = s / 2) begin
      for (int unsigned i = 3 * s - 1; i < WIDTH; i = i + 2 * s) begin
        gg[i] = gg[i] | (pp[i] & gg[i - s]);
        pp[i] = pp[i] & pp[i - s];
      end
    end
    sum    = p ^ {gg[WIDTH-2:0], 1'b0};
    sum_p1 = p ^ {gg[WIDTH-2:0] | pp[WIDTH-2:0], 1'b1};
    cout    = gg[WIDTH-1];
    cout_p1 = gg[WIDTH-1] | pp[WIDTH-1];
  end
endmodule
