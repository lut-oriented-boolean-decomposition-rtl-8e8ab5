// tb_const_mult: checks A * C exhaustively over A for the five evaluated
// constant sizes (7x29, 8x46, 9x101, 9x157, 10x183 bits) with 6-bit
// sub-words, and for 7x29 also with 5-bit sub-words. The reference is a
// full-width multiplication. A watchdog ends the run after 10000 cycles.
module tb_const_mult;
  localparam logic [28:0]  C29  = 29'd536870909;                       // 2**29 - 3
  localparam logic [45:0]  C46  = 46'd70368744177629;
  localparam logic [100:0] C101 = 101'h1f_ffff_ffff_ffff_ffff_ffff_fce7;  // 2535301200456458802993406409959
  localparam logic [156:0] C157 = {157{1'b1}} - 157'd6;                 // 2**157 - 7
  localparam logic [182:0] C183 = {183{1'b1}};                          // 2**183 - 1

  logic         clk = 1'b0;
  logic [9:0]   a;
  logic [35:0]  r29, r29b;
  logic [53:0]  r46;
  logic [109:0] r101;
  logic [165:0] r157;
  logic [192:0] r183;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  const_mult                                                    u29  (.a(a[6:0]), .r(r29));
  const_mult #(.WA(7),  .WC(29),  .C(C29),  .SW(5))             u29b (.a(a[6:0]), .r(r29b));
  const_mult #(.WA(8),  .WC(46),  .C(C46),  .SW(6))             u46  (.a(a[7:0]), .r(r46));
  const_mult #(.WA(9),  .WC(101), .C(C101), .SW(6))             u101 (.a(a[8:0]), .r(r101));
  const_mult #(.WA(9),  .WC(157), .C(C157), .SW(6))             u157 (.a(a[8:0]), .r(r157));
  const_mult #(.WA(10), .WC(183), .C(C183), .SW(6))             u183 (.a(a),      .r(r183));

  task automatic expect_eq(input string what, input logic [192:0] got, input logic [192:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s mismatch a=%0d got=%0h exp=%0h", what, a, got, exp);
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
    for (int unsigned i = 0; i < 1024; i++) begin
      a = 10'(i);
      @(posedge clk);
      if (i < 128) begin
        expect_eq("7x29",    193'(r29),  193'(36'(a[6:0]) * 36'(C29)));
        expect_eq("7x29/5",  193'(r29b), 193'(36'(a[6:0]) * 36'(C29)));
      end
      if (i < 256) expect_eq("8x46",  193'(r46),  193'(54'(a[7:0]) * 54'(C46)));
      if (i < 512) begin
        expect_eq("9x101", 193'(r101), 193'(110'(a[8:0]) * 110'(C101)));
        expect_eq("9x157", 193'(r157), 193'(166'(a[8:0]) * 166'(C157)));
      end
      expect_eq("10x183", r183, 193'(a) * 193'(C183));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
