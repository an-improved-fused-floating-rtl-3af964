// tb_fp3_bk_adder: Brent-Kung compound adder at several widths.
// Instances of width 2, 3, 8, 25, 32 and 57 (the widths used in the design
// and small odd cases) get random and corner operands; sum, sum+1 and both
// carry-outs are compared with the simulator's own addition.
`timescale 1ns/1ps
module tb_fp3_bk_adder;
  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [63:0] ra, rb;

  localparam int NW = 6;
  localparam int WS [NW] = '{2, 3, 8, 25, 32, 57};

  for (genvar g = 0; g < NW; g++) begin : g_w
    localparam int W = WS[g];
    logic [W-1:0] s, s1;
    logic         co, co1;
    fp3_bk_adder #(.WIDTH(W)) u_add (.a(ra[W-1:0]), .b(rb[W-1:0]), .sum(s),
                                     .sum_p1(s1), .cout(co), .cout_p1(co1));
    always @(negedge clk) begin
      logic [W:0] e0, e1;
      e0 = {1'b0, ra[W-1:0]} + {1'b0, rb[W-1:0]};
      e1 = e0 + 1'b1;
      checks++;
      if ({co, s} !== e0 || {co1, s1} !== e1) begin
        failures++;
        if (failures < 10) $display("FAIL W=%0d a=%h b=%h s=%h s1=%h", W, ra[W-1:0], rb[W-1:0], s, s1);
      end
    end
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ra = 0; rb = 0;
    for (int n = 0; n < 20000; n++) begin
      @(posedge clk);
      case (n % 4)
        0: begin ra = {$urandom, $urandom}; rb = {$urandom, $urandom}; end
        1: begin ra = {$urandom, $urandom}; rb = ~ra; end               // all propagate
        2: begin ra = {$urandom, $urandom}; rb = ~ra ^ (64'h1 << $urandom_range(63)); end
        default: begin ra = '1; rb = 64'($urandom_range(3)); end
      endcase
    end
    @(posedge clk);
    @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
