// tb_lut_arith_top: end-to-end test of every example datapath in the top,
// at its default sizes. It runs all 2x2 products, all 65536 mod-241
// products, 30000 random mod-3329 products, every 7-bit constant product,
// 3000 random 168-bit reductions, all 16-bit divisions by 5 and all
// 8 x 8 plain products, comparing
// each result with integer arithmetic.
// It also counts how often each mechanism of the method fires, through
// hierarchical references, and fails if one never does:
//   - the hand-mapped T-function term of the mod-241 multiplier is non-zero
//   - the folded high bits of a sum give a non-zero table value
//   - the first and the second modular correction subtract P
//   - constant multiplication adds more than one shifted sub-product
//   - constant division re-divides a residue sum of D or more (Q_t > 0)
//   - the plain multiplier concatenates two non-zero diagonal products
// All paths are combinational; each result is sampled 1 time unit after
// the inputs change. A watchdog ends the run after 500000 clock cycles.
module tb_lut_arith_top;
  logic         clk = 1'b0;
  logic [1:0]   m2_a, m2_b;
  logic [3:0]   m2_r_sb, m2_r_dnf, m2_r_rm;
  logic [7:0]   mm241_a, mm241_b, mm241_r;
  logic [11:0]  mm3329_a, mm3329_b, mm3329_r;
  logic [6:0]   cm_a;
  logic [35:0]  cm_r;
  logic [167:0] mr_a;
  logic [7:0]   mr_r;
  logic [15:0]  cd_x, cd_q;
  logic [2:0]   cd_r;
  logic [7:0]   mul_a, mul_b;
  logic [15:0]  mul_r;
  int           checks = 0, failures = 0;

  typedef enum int {EV_TFUNC, EV_FOLD, EV_CORR1, EV_CORR2, EV_CM_TREE, EV_DIV_QT, EV_CONCAT, EV_N} ev_e;
  int unsigned  events [EV_N];

  always #5 clk = ~clk;

  lut_arith_top dut (.*);

  task automatic expect_eq(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s mismatch got=%0d exp=%0d", what, got, exp);
    end
  endtask

  // correction / fold activity of one mod_fold instance, sampled now
  task automatic count_fold(input logic [63:0] g, input logic [63:0] r0,
                            input logic [63:0] r1, input int unsigned p);
    if (g != 0)   events[EV_FOLD]++;
    if (r0 >= p)  events[EV_CORR1]++;
    if (r1 >= p)  events[EV_CORR2]++;
  endtask

  initial begin
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (events[e]) events[e] = 0;
    m2_a = '0; m2_b = '0; mm241_a = '0; mm241_b = '0; mm3329_a = '0; mm3329_b = '0;
    cm_a = '0; mr_a = '0; cd_x = '0; mul_a = '0; mul_b = '0;

    for (int unsigned i = 0; i < 16; i++) begin
      m2_a = 2'(i); m2_b = 2'(i >> 2);
      #1;
      expect_eq("m2 school-book", 64'(m2_r_sb),  64'(m2_a * m2_b));
      expect_eq("m2 dnf",         64'(m2_r_dnf), 64'(m2_a * m2_b));
      expect_eq("m2 reed-muller", 64'(m2_r_rm),  64'(m2_a * m2_b));
    end

    for (int unsigned i = 0; i < 65536; i++) begin
      mm241_a = 8'(i); mm241_b = 8'(i >> 8);
      #1;
      expect_eq("mod 241", 64'(mm241_r), 64'((int'(mm241_a) * int'(mm241_b)) % 241));
      if (dut.u_mm241.g_a[2].g_b[2].g_t241.u_t.t != 0) events[EV_TFUNC]++;
      count_fold(64'(dut.u_mm241.u_fold.g), 64'(dut.u_mm241.u_fold.r0),
                 64'(dut.u_mm241.u_fold.r1), 241);
    end

    for (int n = 0; n < 30000; n++) begin
      mm3329_a = (n == 0) ? 12'hfff : 12'($urandom);
      mm3329_b = (n == 0) ? 12'hfff : 12'($urandom);
      #1;
      expect_eq("mod 3329", 64'(mm3329_r), 64'((int'(mm3329_a) * int'(mm3329_b)) % 3329));
      count_fold(64'(dut.u_mm3329.u_fold.g), 64'(dut.u_mm3329.u_fold.r0),
                 64'(dut.u_mm3329.u_fold.r1), 3329);
    end

    for (int unsigned i = 0; i < 128; i++) begin
      cm_a = 7'(i);
      #1;
      expect_eq("const mult", 64'(cm_r), 64'(i) * 64'd536870909);
      if (cm_a[6]) events[EV_CM_TREE]++;
    end

    for (int n = 0; n < 3000; n++) begin
      for (int k = 0; k < 6; k++) mr_a[k*28 +: 28] = 28'($urandom);
      if (n == 0) mr_a = '1;
      #1;
      expect_eq("mod reduce", 64'(mr_r), 64'(mr_a % 168'd241));
      count_fold(64'(dut.u_mr.u_fold.g), 64'(dut.u_mr.u_fold.r0),
                 64'(dut.u_mr.u_fold.r1), 241);
    end

    for (int unsigned i = 0; i < 65536; i++) begin
      cd_x = 16'(i);
      #1;
      expect_eq("div q", 64'(cd_q), 64'(i / 5));
      expect_eq("div r", 64'(cd_r), 64'(i % 5));
      if (dut.u_cd.qt != 0) events[EV_DIV_QT]++;
    end

    for (int unsigned i = 0; i < 65536; i++) begin
      mul_a = 8'(i); mul_b = 8'(i >> 8);
      #1;
      expect_eq("plain mult", 64'(mul_r), 64'(mul_a) * 64'(mul_b));
      if (dut.u_mul.diag[7:0] != 0 && dut.u_mul.diag[15:8] != 0) events[EV_CONCAT]++;
    end

    for (int e = 0; e < EV_N; e++) begin
      ev_e ev;
      ev = ev_e'(e);
      $display("mechanism %-10s happened %0d times", ev.name(), events[e]);
      checks++;
      if (events[e] == 0) begin
        failures++;
        $display("mechanism %s never happened", ev.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
