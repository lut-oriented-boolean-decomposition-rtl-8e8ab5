// tb_pp_func: exhaustive check of partial-product functions
// g = (a * b * C) mod P for the two worked configurations:
//   mod 241 : 3-bit x 3-bit sub-words, weight 2**3 = 8 (default parameters)
//             and 3-bit x 2-bit with weight 30 (= 2**9 mod 241)
//   mod 3329: 4-bit x 4-bit sub-words, weight 767 (= 2**12 mod 3329)
// A watchdog ends the run after 10000 cycles.
module tb_pp_func;
  logic        clk = 1'b0;
  logic [3:0]  a, b;
  logic [7:0]  g1, g2;
  logic [11:0] g3;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  pp_func                                                         u1 (.a(a[2:0]), .b(b[2:0]), .g(g1));
  pp_func #(.WA(3), .WB(2), .C(30),  .P(241),  .WO(8))            u2 (.a(a[2:0]), .b(b[1:0]), .g(g2));
  pp_func #(.WA(4), .WB(4), .C(767), .P(3329), .WO(12))           u3 (.a(a),      .b(b),      .g(g3));

  task automatic expect_eq(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s mismatch a=%0d b=%0d got=%0d exp=%0d", what, a, b, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < 256; i++) begin
      a = 4'(i);
      b = 4'(i >> 4);
      @(posedge clk);
      if (a < 8 && b < 8) expect_eq("241/8",  g1, (a * b * 8) % 241);
      if (a < 8 && b < 4) expect_eq("241/30", g2, (a * b * 30) % 241);
      expect_eq("3329/767", g3, (a * b * 767) % 3329);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
