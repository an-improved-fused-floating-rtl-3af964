// tb_fp3_lza3: three-input leading-zero anticipator.
// Builds random triples whose 57-bit sum is a chosen non-negative value with
// a chosen number of leading zeros, and checks that the predicted count is
// the true count or one less. Both outcomes must occur.
`timescale 1ns/1ps
module tb_fp3_lza3;
  import fp3_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  win_t x, y, z, tgt;
  logic [LZC_W-1:0] cnt;
  int checks = 0, failures = 0, n_exact = 0, n_short = 0;

  fp3_lza3 dut (.x(x), .y(y), .z(z), .cnt(cnt));

  function automatic int lzc(win_t v);
    for (int i = WIN_W - 1; i >= 0; i--) if (v[i]) return WIN_W - 1 - i;
    return WIN_W;
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int lz;
    for (int n = 0; n < 50000; n++) begin
      lz  = int'($urandom_range(1, WIN_W - 1));
      tgt = win_t'({$urandom, $urandom}) >> lz;
      tgt[WIN_W-1-lz] = 1'b1;
      x = win_t'({$urandom, $urandom});
      y = (n % 2) ? ~x : win_t'({$urandom, $urandom});   // often cancelling
      z = tgt - x - y;
      @(posedge clk);
      checks++;
      if (int'(cnt) == lz) n_exact++;
      else if (int'(cnt) == lz - 1) n_short++;
      else begin
        failures++;
        if (failures < 10) $display("FAIL sum=%h lz=%0d cnt=%0d", tgt, lz, cnt);
      end
    end
    $display("exact=%0d short=%0d", n_exact, n_short);
    if (n_exact == 0 || n_short == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
