// tb_mod_fold: checks the final reduction r = s mod P: exhaustively for a
// 12-bit sum and P = 241 (default), and for all 16-bit sums with P = 3329.
// The reference is the % operator. A watchdog ends the run after 100000
// cycles.
module tb_mod_fold;
  logic        clk = 1'b0;
  logic [15:0] s;
  logic [7:0]  r1;
  logic [11:0] r2;
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  mod_fold                          u1 (.s(s[11:0]), .r(r1));
  mod_fold #(.WS(16), .P(3329))     u2 (.s(s),       .r(r2));

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < 65536; i++) begin
      s = 16'(i);
      #1;
      if (i < 4096) begin
        checks++;
        if (r1 != 8'((i % 4096) % 241)) begin
          failures++;
          $display("241 mismatch s=%0d r=%0d", i, r1);
        end
      end
      checks++;
      if (r2 != 12'(i % 3329)) begin
        failures++;
        $display("3329 mismatch s=%0d r=%0d", i, r2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
