// tb_fp3_exp_align: exponent compare and significand alignment.
// Random exponent triples (equal, close, far apart, subnormal) and
// fractions. Checks the largest effective exponent, the max/mid/min
// ordering and d_mid against a sort done here, and each aligned magnitude
// against the exact shifted significand: window bits [56:3] must hold the
// truncated value, bit 2 the OR of what was lost, bits [1:0] zero.
`timescale 1ns/1ps
module tb_fp3_exp_align;
  import fp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic [EXP_W-1:0]  e [3];
  logic [FRAC_W-1:0] fr [3];
  logic [EXP_W-1:0]  emax;
  logic [1:0]        imax, imid, imin;
  logic [EXP_W:0]    dmid;
  win_t              mag [3];
  int checks = 0, failures = 0, n_sticky = 0;

  fp3_exp_align dut (
    .exp_a(e[0]), .exp_b(e[1]), .exp_c(e[2]), .frac_a(fr[0]), .frac_b(fr[1]), .frac_c(fr[2]),
    .emax(emax), .idx_max(imax), .idx_mid(imid), .idx_min(imin), .d_mid(dmid),
    .mag_a(mag[0]), .mag_b(mag[1]), .mag_c(mag[2]));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s e=%0d,%0d,%0d", what, e[0], e[1], e[2]);
    end
  endtask

  initial begin
    int ee [3];
    int mx, sorted_mid;
    logic [255:0] full, hi, back;
    logic [SIG_W-1:0] sig;
    for (int n = 0; n < 20000; n++) begin
      int base;
      base = int'($urandom_range(255));
      for (int i = 0; i < 3; i++) begin
        case ($urandom_range(3))
          0: e[i] = EXP_W'($urandom_range(255));
          1: e[i] = EXP_W'(base);
          2: e[i] = EXP_W'($urandom_range(2));
          default: e[i] = EXP_W'((base + int'($urandom_range(70))) % 256);
        endcase
        fr[i] = FRAC_W'($urandom);
      end
      @(posedge clk);
      for (int i = 0; i < 3; i++) ee[i] = (e[i] == 0) ? 1 : int'(e[i]);
      mx = ee[0];
      if (ee[1] > mx) mx = ee[1];
      if (ee[2] > mx) mx = ee[2];
      check(int'(emax) == mx, "emax");
      check(ee[imax] == mx, "idx_max");
      check(imax != imid && imid != imin && imax != imin, "distinct idx");
      check(ee[imid] >= ee[imin], "mid >= min");
      sorted_mid = ee[imid];
      check(int'(dmid) == mx - sorted_mid, "d_mid");
      for (int i = 0; i < 3; i++) begin
        sig  = {e[i] != 0, fr[i]};
        // exact value in units of 2^-100 of window bit 3; the significand LSB sits 27 bits above bit 3
        full = 256'(sig) << 127;
        if (mx - ee[i] > 120) begin hi = 0; back = (sig != 0); end
        else begin
          hi   = full >> (mx - ee[i]);
          back = 256'((hi & ((256'd1 << 100) - 1)) != 0);
        end
        if (back != 0) n_sticky++;
        check(256'(mag[i][WIN_W-1:3]) == (hi >> 100) && mag[i][2] == (back != 0) &&
              mag[i][1:0] == 2'b00, "magnitude");
      end
    end
    if (n_sticky == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
