// tb_wl_const_div: runs the twelve division-by-a-constant sizes of the
// evaluation: 16-bit X by 5, 11, 13; 32-bit X by 5, 11, 23; 48-bit X by
// 47, 113, 241; 64-bit X by 5, 11, 23; chunk width ceil(log2 d). Each
// instance gets all-ones, zero and 3000 random operands; quotient and
// residue are compared with / and %. A watchdog ends the run after 100000
// cycles.
module tb_wl_const_div;
  localparam int unsigned NC = 12;
  localparam int unsigned WX [NC] = '{16, 16, 16, 32, 32, 32, 48, 48, 48, 64, 64, 64};
  localparam int unsigned DS [NC] = '{5, 11, 13, 5, 11, 23, 47, 113, 241, 5, 11, 23};

  logic        clk = 1'b0;
  logic [63:0] x;
  logic [63:0] q [NC];
  logic [7:0]  r [NC];
  int          checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar i = 0; i < NC; i++) begin : g_c
    logic [WX[i]-1:0]         qi;
    logic [$clog2(DS[i])-1:0] ri;
    const_div #(.WX(WX[i]), .D(DS[i])) dut (.x(x[WX[i]-1:0]), .q(qi), .r(ri));
    assign q[i] = 64'(qi);
    assign r[i] = 8'(ri);
  end

  task automatic check_all();
    logic [63:0] xv;
    #1;
    for (int i = 0; i < NC; i++) begin
      xv = (WX[i] == 64) ? x : x & ((64'd1 << WX[i]) - 64'd1);
      checks += 2;
      if (q[i] != xv / 64'(DS[i])) begin
        failures++;
        $display("%0d/%0d q mismatch x=%0d q=%0d", WX[i], DS[i], xv, q[i]);
      end
      if (64'(r[i]) != xv % 64'(DS[i])) begin
        failures++;
        $display("%0d/%0d r mismatch x=%0d r=%0d", WX[i], DS[i], xv, r[i]);
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
    x = '1; check_all();
    x = '0; check_all();
    for (int n = 0; n < 3000; n++) begin
      x = {$urandom, $urandom};
      check_all();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
