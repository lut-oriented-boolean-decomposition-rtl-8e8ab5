// tb_mod_correct: exhaustive check of the conditional subtraction
// y = x - P if x >= P else x for a 9-bit input and P = 241 (default).
// A watchdog ends the run after 2000 cycles.
module tb_mod_correct;
  logic       clk = 1'b0;
  logic [8:0] x, y;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_correct dut (.x(x), .y(y));

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < 512; i++) begin
      x = 9'(i);
      @(posedge clk);
      checks++;
      if (y != 9'((i >= 241) ? i - 241 : i)) begin
        failures++;
        $display("mismatch x=%0d y=%0d", x, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
