// lut_arith_top: the worked examples of the LUT-oriented decomposition
// method side by side, each with its own ports. All paths are
// combinational; outputs follow the inputs after the logic delay.
//   m2_*     : 2x2 multiplier in school-book, DNF and Reed-Muller form
//   mm241_*  : (A * B) mod 241,  8-bit operands, 3/3/2-bit sub-words
//   mm3329_* : (A * B) mod 3329, 12-bit operands, 4/4/4-bit sub-words
//   cm_*     : A * 536870909 (7-bit A, 29-bit constant 2**29 - 3)
//   mr_*     : A mod 241 for a 168-bit A
//   cd_*     : X / 5 for a 16-bit X, quotient and residue
//   mul_*    : plain 8 x 8 product, 4-bit sub-words
// The choice of configurations is the first one listed for each operation
// in the method's evaluation (the plain multiplier has none, so its size is
// this design's); placing them in one top is this design's choice.
module lut_arith_top (
  input  logic [1:0]   m2_a,
  input  logic [1:0]   m2_b,
  output logic [3:0]   m2_r_sb,
  output logic [3:0]   m2_r_dnf,
  output logic [3:0]   m2_r_rm,
  input  logic [7:0]   mm241_a,
  input  logic [7:0]   mm241_b,
  output logic [7:0]   mm241_r,
  input  logic [11:0]  mm3329_a,
  input  logic [11:0]  mm3329_b,
  output logic [11:0]  mm3329_r,
  input  logic [6:0]   cm_a,
  output logic [35:0]  cm_r,
  input  logic [167:0] mr_a,
  output logic [7:0]   mr_r,
  input  logic [15:0]  cd_x,
  output logic [15:0]  cd_q,
  output logic [2:0]   cd_r,
  input  logic [7:0]   mul_a,
  input  logic [7:0]   mul_b,
  output logic [15:0]  mul_r
);
  mult2x2_sb  u_m2_sb  (.a(m2_a), .b(m2_b), .r(m2_r_sb));
  mult2x2_dnf u_m2_dnf (.a(m2_a), .b(m2_b), .r(m2_r_dnf));
  mult2x2_rm  u_m2_rm  (.a(m2_a), .b(m2_b), .r(m2_r_rm));

  modmul #(.N(8),  .SW(3), .P(241))  u_mm241  (.a(mm241_a),  .b(mm241_b),  .r(mm241_r));
  modmul #(.N(12), .SW(4), .P(3329)) u_mm3329 (.a(mm3329_a), .b(mm3329_b), .r(mm3329_r));

  const_mult #(.WA(7), .WC(29), .C(29'd536870909), .SW(6)) u_cm (.a(cm_a), .r(cm_r));

  modred #(.WA(168), .P(241), .SW(6)) u_mr (.a(mr_a), .r(mr_r));

  const_div #(.WX(16), .D(5)) u_cd (.x(cd_x), .q(cd_q), .r(cd_r));

  mult_decomp #(.N(8), .SW(4)) u_mul (.a(mul_a), .b(mul_b), .r(mul_r));
endmodule
