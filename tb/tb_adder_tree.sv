// tb_adder_tree: random and corner-case check of the balanced adder tree
// for three shapes: 9 operands of 8 bits (default, odd count at two
// levels), 5 operands of 13 bits and 2 operands of 4 bits. Each sum is
// compared with a plain running total. A watchdog ends the run after
// 10000 cycles.
module tb_adder_tree;
  logic            clk = 1'b0;
  logic [8:0][7:0]  in9;
  logic [4:0][12:0] in5;
  logic [1:0][3:0]  in2;
  logic [11:0]     s9;
  logic [15:0]     s5;
  logic [4:0]      s2;
  int              checks = 0, failures = 0;

  always #5 clk = ~clk;

  adder_tree                       u9 (.in(in9), .sum(s9));
  adder_tree #(.NIN(5), .W(13))    u5 (.in(in5), .sum(s5));
  adder_tree #(.NIN(2), .W(4))     u2 (.in(in2), .sum(s2));

  task automatic check_all();
    int unsigned e9 = 0, e5 = 0, e2 = 0;
    for (int k = 0; k < 9; k++) e9 += in9[k];
    for (int k = 0; k < 5; k++) e5 += in5[k];
    for (int k = 0; k < 2; k++) e2 += in2[k];
    checks += 3;
    if (s9 != 12'(e9)) begin failures++; $display("9x8 mismatch %0d %0d", s9, e9); end
    if (s5 != 16'(e5)) begin failures++; $display("5x13 mismatch %0d %0d", s5, e5); end
    if (s2 != 5'(e2))  begin failures++; $display("2x4 mismatch %0d %0d", s2, e2); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in9 = '1; in5 = '1; in2 = '1;
    @(posedge clk);
    check_all();
    for (int n = 0; n < 2000; n++) begin
      for (int k = 0; k < 9; k++) in9[k] = 8'($urandom);
      for (int k = 0; k < 5; k++) in5[k] = 13'($urandom);
      for (int k = 0; k < 2; k++) in2[k] = 4'($urandom);
      @(posedge clk);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
