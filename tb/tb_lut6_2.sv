// tb_lut6_2: checks the fracturable LUT cell for every input value.
// With a fixed, irregular INIT the first output must equal INIT[x1..x5]
// (lower half) and the second INIT[{x6..x1}]: lower half for x6 = 0, upper
// half for x6 = 1. A watchdog ends the run after 1000 cycles.
module tb_lut6_2;
  localparam logic [63:0] INIT = 64'hC3A5_1E0F_96B4_7D28;
  logic       clk = 1'b0;
  logic [5:0] x;
  logic       y1, y2;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut6_2 #(.INIT(INIT)) dut (.x(x), .y1(y1), .y2(y2));

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      x = 6'(i);
      @(posedge clk);
      checks += 2;
      if (y1 !== INIT[i % 32]) begin
        failures++;
        $display("y1 mismatch x=%0d", i);
      end
      if (y2 !== INIT[i]) begin
        failures++;
        $display("y2 mismatch x=%0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
