// tb_fp3_invert_reduce: inversion with LSB-extension correction and dual
// 3:2 reduction. For random aligned magnitudes (two zero LSBs) and effective
// signs, the +S terms and pair must sum to S = A -/+ B -/+ C and the -S
// terms and pair to -S (mod 2^57); the -S set is exempt when nothing is
// inverted, where it is never used.
`timescale 1ns/1ps
module tb_fp3_invert_reduce;
  import fp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  win_t ma, mb, mc;
  logic sb, sc;
  win_t pt [3];
  win_t nt [3];
  win_t ps, pc, ns, nc;
  int checks = 0, failures = 0;

  fp3_invert_reduce dut (.mag_a(ma), .mag_b(mb), .mag_c(mc), .seff_b(sb), .seff_c(sc),
                         .pos_t(pt), .neg_t(nt), .pos_s(ps), .pos_c(pc), .neg_s(ns), .neg_c(nc));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [63:0] S;
    for (int n = 0; n < 20000; n++) begin
      ma = win_t'({$urandom, $urandom}) >> 4; ma[1:0] = 0;
      mb = win_t'({$urandom, $urandom}) >> ($urandom_range(4, 30)); mb[1:0] = 0;
      mc = win_t'({$urandom, $urandom}) >> ($urandom_range(4, 30)); mc[1:0] = 0;
      if (n % 5 == 0) mb = ma;
      {sb, sc} = 2'(n);
      @(posedge clk);
      S = 64'(ma) + (sb ? -64'(mb) : 64'(mb)) + (sc ? -64'(mc) : 64'(mc));
      checks++;
      if (win_t'(ps + pc) !== win_t'(S) || win_t'(pt[0] + pt[1] + pt[2]) !== win_t'(S)) begin
        failures++;
        if (failures < 10) $display("FAIL +S sb=%b sc=%b", sb, sc);
      end
      if (sb || sc) begin
        checks++;
        if (win_t'(ns + nc) !== win_t'(-S) || win_t'(nt[0] + nt[1] + nt[2]) !== win_t'(-S)) begin
          failures++;
          if (failures < 10) $display("FAIL -S sb=%b sc=%b", sb, sc);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
