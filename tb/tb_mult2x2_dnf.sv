// tb_mult2x2_dnf: exhaustive self-check of the DNF 2x2 multiplier.
// All 16 operand pairs are applied; each product is compared with the
// integer product a*b. A watchdog ends the run after 1000 clock cycles.
module tb_mult2x2_dnf;
  logic       clk = 1'b0;
  logic [1:0] a, b;
  logic [3:0] r;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  mult2x2_dnf dut (.a(a), .b(b), .r(r));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      a = 2'(i);
      b = 2'(i >> 2);
      @(posedge clk);
      checks++;
      if (r !== 4'(int'(a) * int'(b))) begin
        failures++;
        $display("mismatch a=%0d b=%0d r=%0d", a, b, r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
