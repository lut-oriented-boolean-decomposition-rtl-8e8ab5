// tb_modmul: checks the decomposed modular multiplier.
//   P = 241, 8-bit operands (defaults): all 65536 operand pairs.
//   P = 3329, 12-bit operands, 4-bit sub-words: corner values and 20000
//   random pairs, operands over the full 12-bit range.
// The reference is (a*b) % P. A watchdog ends the run after 200000 cycles;
// the multiplier is combinational, so each result is checked 1 time unit
// after its inputs change.
module tb_modmul;
  logic        clk = 1'b0;
  logic [7:0]  a8, b8, r8;
  logic [11:0] a12, b12, r12;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  modmul                                u241  (.a(a8),  .b(b8),  .r(r8));
  modmul #(.N(12), .SW(4), .P(3329))    u3329 (.a(a12), .b(b12), .r(r12));

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check12();
    #1;
    checks++;
    if (r12 != 12'((int'(a12) * int'(b12)) % 3329)) begin
      failures++;
      $display("3329 mismatch a=%0d b=%0d r=%0d", a12, b12, r12);
    end
  endtask

  initial begin
    a12 = '0; b12 = '0;
    for (int unsigned i = 0; i < 65536; i++) begin
      a8 = 8'(i);
      b8 = 8'(i >> 8);
      #1;
      checks++;
      if (r8 != 8'((int'(a8) * int'(b8)) % 241)) begin
        failures++;
        $display("241 mismatch a=%0d b=%0d r=%0d", a8, b8, r8);
      end
    end
    a12 = 12'hfff; b12 = 12'hfff; check12();
    a12 = 12'd3328; b12 = 12'd3328; check12();
    a12 = 12'd3329; b12 = 12'd1; check12();
    a12 = 12'd0; b12 = 12'hfff; check12();
    for (int n = 0; n < 20000; n++) begin
      a12 = 12'($urandom);
      b12 = 12'($urandom);
      check12();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
