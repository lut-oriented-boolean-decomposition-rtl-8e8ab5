// tb_wl_modmul: runs the modular-multiplication sizes of the evaluation,
// (A * B) mod P for P = 241, 491, 997, 2011 and 4051 with
// ceil(log2 P)-bit operands. Sub-words are 3 bits for the 8-bit case and
// 4 bits otherwise, so that every partial product is a function of at most
// eight inputs. Each instance gets the corner operands (all ones, P - 1)
// and 20000 random pairs; the reference is (a*b) % P. A watchdog ends the
// run after 500000 cycles.
module tb_wl_modmul;
  localparam int unsigned NP = 5;
  localparam int unsigned PS [NP] = '{241, 491, 997, 2011, 4051};
  localparam int unsigned SWS[NP] = '{3,   4,   4,   4,    4};

  logic        clk = 1'b0;
  logic [11:0] a, b;
  logic [11:0] r [NP];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NP; i++) begin : g_p
    localparam int unsigned N = $clog2(PS[i]);
    logic [N-1:0] ri;
    modmul #(.N(N), .SW(SWS[i]), .P(PS[i])) dut (.a(a[N-1:0]), .b(b[N-1:0]), .r(ri));
    assign r[i] = 12'(ri);
  end

  task automatic check_all();
    int unsigned n, av, bv;
    #1;
    for (int i = 0; i < NP; i++) begin
      n  = $clog2(PS[i]);
      av = a % (2 ** n);
      bv = b % (2 ** n);
      checks++;
      if (r[i] != 12'((av * bv) % PS[i])) begin
        failures++;
        $display("P=%0d mismatch a=%0d b=%0d r=%0d", PS[i], av, bv, r[i]);
      end
    end
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '1; b = '1; check_all();
    a = '0; b = '1; check_all();
    for (int i = 0; i < NP; i++) begin
      a = 12'(PS[i] - 1); b = 12'(PS[i] - 1); check_all();
    end
    for (int n = 0; n < 20000; n++) begin
      a = 12'($urandom); b = 12'($urandom);
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
