// tb_mod241_tfunc: checks T = ((a8 a7) * (b8 b7) * 240) mod 241 for all 16
// inputs, once against the arithmetic and once against the decimal T
// values tabulated for this function (rows in order a8 a7 b8 b7 = 0000 ..
// 1111). A watchdog ends the run after 1000 cycles.
module tb_mod241_tfunc;
  localparam int unsigned TAB [16] = '{0, 0, 0, 0, 0, 240, 239, 238,
                                       0, 239, 237, 235, 0, 238, 235, 232};
  logic       clk = 1'b0;
  logic [1:0] ah, bh;
  logic [7:0] t;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod241_tfunc dut (.ah(ah), .bh(bh), .t(t));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < 16; i++) begin
      ah = 2'(i >> 2);
      bh = 2'(i);
      @(posedge clk);
      checks += 2;
      if (t != 8'((ah * bh * 240) % 241)) begin
        failures++;
        $display("arith mismatch a=%0d b=%0d t=%0d", ah, bh, t);
      end
      if (t != 8'(TAB[i])) begin
        failures++;
        $display("table mismatch row=%0d t=%0d", i, t);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
