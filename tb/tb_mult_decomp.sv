// tb_mult_decomp: checks the decomposed plain multiplier against a*b:
//   8-bit operands, 4-bit sub-words (defaults): all 65536 pairs;
//   7-bit operands, 3-bit sub-words (3/3/1 split): all 16384 pairs;
//   16-bit operands, 4-bit sub-words: corners and 20000 random pairs.
// A watchdog ends the run after 200000 cycles.
module tb_mult_decomp;
  logic        clk = 1'b0;
  logic [15:0] a, b;
  logic [15:0] r8;
  logic [13:0] r7;
  logic [31:0] r16;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  mult_decomp                        u8  (.a(a[7:0]), .b(b[7:0]), .r(r8));
  mult_decomp #(.N(7),  .SW(3))      u7  (.a(a[6:0]), .b(b[6:0]), .r(r7));
  mult_decomp #(.N(16), .SW(4))      u16 (.a(a),      .b(b),      .r(r16));

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s mismatch a=%0d b=%0d got=%0d exp=%0d", what, a, b, got, exp);
    end
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
      a = 16'(i & 8'hff);
      b = 16'(i >> 8);
      #1;
      expect_eq("8x8", 32'(r8), 32'(a[7:0]) * 32'(b[7:0]));
      if (a < 128 && b < 128) expect_eq("7x7", 32'(r7), 32'(a[6:0]) * 32'(b[6:0]));
    end
    a = '1; b = '1; #1;
    expect_eq("16x16", r16, 32'(a) * 32'(b));
    for (int n = 0; n < 20000; n++) begin
      a = 16'($urandom); b = 16'($urandom);
      #1;
      expect_eq("16x16", r16, 32'(a) * 32'(b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
