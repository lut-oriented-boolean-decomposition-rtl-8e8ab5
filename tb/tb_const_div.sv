// tb_const_div: checks division by a constant, quotient and residue.
//   16-bit X / 5 (defaults): all 65536 values.
//   9-bit X / 7: all values, including the worked example 489 = 7*69 + 6.
//   32-bit X / 11, 48-bit X / 241 and 64-bit X / 23: 3000 random values
//   each plus the all-ones value.
// References are the / and % operators. A watchdog ends the run after
// 200000 cycles.
module tb_const_div;
  logic        clk = 1'b0;
  logic [63:0] x;
  logic [15:0] q16;  logic [2:0] r16;
  logic [8:0]  q9;   logic [2:0] r9;
  logic [31:0] q32;  logic [3:0] r32;
  logic [47:0] q48;  logic [7:0] r48;
  logic [63:0] q64;  logic [4:0] r64;
  int          checks = 0, failures = 0;
  bit          seen_489 = 1'b0;

  always #5 clk = ~clk;

  const_div                           u16 (.x(x[15:0]), .q(q16), .r(r16));
  const_div #(.WX(9),  .D(7))         u9  (.x(x[8:0]),  .q(q9),  .r(r9));
  const_div #(.WX(32), .D(11))        u32 (.x(x[31:0]), .q(q32), .r(r32));
  const_div #(.WX(48), .D(241))       u48 (.x(x[47:0]), .q(q48), .r(r48));
  const_div #(.WX(64), .D(23))        u64 (.x(x),       .q(q64), .r(r64));

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s mismatch x=%0d got=%0d exp=%0d", what, x, got, exp);
    end
  endtask

  task automatic check_wide();
    #1;
    expect_eq("q32", 64'(q32), 64'(x[31:0] / 32'd11));
    expect_eq("r32", 64'(r32), 64'(x[31:0] % 32'd11));
    expect_eq("q48", 64'(q48), 64'(x[47:0] / 48'd241));
    expect_eq("r48", 64'(r48), 64'(x[47:0] % 48'd241));
    expect_eq("q64", q64, x / 64'd23);
    expect_eq("r64", 64'(r64), x % 64'd23);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < 65536; i++) begin
      x = 64'(i);
      #1;
      expect_eq("q16", 64'(q16), 64'(i / 5));
      expect_eq("r16", 64'(r16), 64'(i % 5));
      if (i < 512) begin
        expect_eq("q9", 64'(q9), 64'(i / 7));
        expect_eq("r9", 64'(r9), 64'(i % 7));
        if (i == 489 && q9 == 9'd69 && r9 == 3'd6) seen_489 = 1'b1;
      end
    end
    checks++;
    if (!seen_489) begin failures++; $display("worked example 489/7 failed"); end
    x = '1; check_wide();
    for (int n = 0; n < 3000; n++) begin
      x = {$urandom, $urandom};
      check_wide();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
