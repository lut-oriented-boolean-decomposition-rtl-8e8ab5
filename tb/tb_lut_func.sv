// tb_lut_func: checks the LUT mapping of Boolean functions in all three
// mapping regimes, exhaustively over the inputs:
//   NI = 4 (default table, 2x2 multiplier) and NI = 5 (popcount): two
//   functions per cell; NI = 6 (x*x mod 97): one cell per output;
//   NI = 7 (x mod 31) and NI = 8 (4x4 multiplier): Shannon split into
//   6-input subfunctions plus a multiplexer.
// Each output is compared with the arithmetic it encodes. A watchdog ends
// the run after 10000 cycles.
module tb_lut_func;
  // generic table builder: f selects the function, up to 8 inputs/outputs
  function automatic int unsigned fn(input int unsigned f, input int unsigned v);
    case (f)
      5: return $countones(v);
      6: return (v * v) % 97;
      7: return v % 31;
      default: return (v % 16) * (v / 16);
    endcase
  endfunction

  function automatic logic [8*256-1:0] tt(input int unsigned f, input int unsigned ni,
                                          input int unsigned no);
    logic [8*256-1:0] t = '0;
    for (int unsigned e = 0; e < 2**ni; e++)
      for (int unsigned o = 0; o < no; o++)
        t[o*(2**ni) + e] = 1'((fn(f, e) >> o) & 1);
    return t;
  endfunction

  localparam logic [8*256-1:0] T5 = tt(5, 5, 3);
  localparam logic [8*256-1:0] T6 = tt(6, 6, 7);
  localparam logic [8*256-1:0] T7 = tt(7, 7, 5);
  localparam logic [8*256-1:0] T8 = tt(8, 8, 8);

  logic       clk = 1'b0;
  logic [7:0] x;
  logic [3:0] y4;
  logic [2:0] y5;
  logic [6:0] y6;
  logic [4:0] y7;
  logic [7:0] y8;
  int         checks = 0, failures = 0;

  always #5 clk = ~clk;

  lut_func                                          u4 (.x(x[3:0]), .y(y4));
  lut_func #(.NI(5), .NO(3), .TT(T5[3*32-1:0]))     u5 (.x(x[4:0]), .y(y5));
  lut_func #(.NI(6), .NO(7), .TT(T6[7*64-1:0]))     u6 (.x(x[5:0]), .y(y6));
  lut_func #(.NI(7), .NO(5), .TT(T7[5*128-1:0]))    u7 (.x(x[6:0]), .y(y7));
  lut_func #(.NI(8), .NO(8), .TT(T8[8*256-1:0]))    u8 (.x(x),      .y(y8));

  task automatic expect_eq(input string what, input int unsigned got, input int unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s mismatch x=%0d got=%0d exp=%0d", what, x, got, exp);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int unsigned i = 0; i < 256; i++) begin
      x = 8'(i);
      @(posedge clk);
      if (i < 16)  expect_eq("ni4", y4, (i % 4) * (i / 4));
      if (i < 32)  expect_eq("ni5", y5, $countones(i));
      if (i < 64)  expect_eq("ni6", y6, (i * i) % 97);
      if (i < 128) expect_eq("ni7", y7, i % 31);
      expect_eq("ni8", y8, (i % 16) * (i / 16));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
