// tb_modred: checks wide modular reduction A mod P.
//   168-bit A, P = 241 (defaults), and 270-bit A, P = 4051: the values
//   0, 2**W - 1 and single set bits, then 3000 random operands.
// The reference is the % operator on the full-width operand. A watchdog
// ends the run after 20000 cycles.
module tb_modred;
  logic         clk = 1'b0;
  logic [269:0] a;
  logic [7:0]   r168;
  logic [11:0]  r270;
  int           checks = 0, failures = 0;

  always #5 clk = ~clk;

  modred                                  u168 (.a(a[167:0]), .r(r168));
  modred #(.WA(270), .P(4051), .SW(6))    u270 (.a(a),        .r(r270));

  task automatic check_now();
    logic [269:0] e168, e270;
    #1;
    e168 = 270'(a[167:0]) % 270'd241;
    e270 = a % 270'd4051;
    checks += 2;
    if (270'(r168) != e168) begin failures++; $display("168/241 mismatch a=%0h r=%0d", a, r168); end
    if (270'(r270) != e270) begin failures++; $display("270/4051 mismatch a=%0h r=%0d", a, r270); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;  check_now();
    a = '1;  check_now();
    for (int k = 0; k < 270; k++) begin
      a = 270'(1) << k;
      check_now();
    end
    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 9; k++) a[k*30 +: 30] = 30'($urandom);
      check_now();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
