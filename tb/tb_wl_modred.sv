// tb_wl_modred: runs the ten modular-reduction sizes of the evaluation,
// A mod P for 168-bit and 270-bit A and P = 241, 491, 997, 2011, 4051,
// with 6-bit sub-words. Each instance gets all-ones, single set bits and
// 1000 random operands; the reference is the % operator on the full
// operand. A watchdog ends the run after 100000 cycles.
module tb_wl_modred;
  localparam int unsigned NP = 5;
  localparam int unsigned PS [NP] = '{241, 491, 997, 2011, 4051};
  localparam int unsigned WS [2]  = '{168, 270};

  logic         clk = 1'b0;
  logic [269:0] a;
  logic [11:0]  r [2][NP];
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar w = 0; w < 2; w++) begin : g_w
    for (genvar i = 0; i < NP; i++) begin : g_p
      logic [$clog2(PS[i])-1:0] ri;
      modred #(.WA(WS[w]), .P(PS[i]), .SW(6)) dut (.a(a[WS[w]-1:0]), .r(ri));
      assign r[w][i] = 12'(ri);
    end
  end

  task automatic check_all();
    logic [269:0] av, e;
    #1;
    for (int w = 0; w < 2; w++) begin
      av = (w == 0) ? 270'(a[167:0]) : a;
      for (int i = 0; i < NP; i++) begin
        e = av % 270'(PS[i]);
        checks++;
        if (270'(r[w][i]) != e) begin
          failures++;
          $display("W=%0d P=%0d mismatch r=%0d exp=%0d", WS[w], PS[i], r[w][i], e);
        end
      end
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; check_all();
    for (int k = 0; k < 270; k += 7) begin
      a = 270'(1) << k;
      check_all();
    end
    for (int n = 0; n < 1000; n++) begin
      for (int k = 0; k < 9; k++) a[k*30 +: 30] = 30'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
