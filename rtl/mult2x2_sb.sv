// mult2x2_sb: 2-bit x 2-bit unsigned multiplier, school-book form.
// Four AND gates form the partial products f1 = a1*b2, f2 = a2*b1,
// f3 = a2*b2 and r1 = a1*b1; one half adder adds f1 and f2 (sum r2, carry c),
// a second adds c and f3 (sum r3, carry r4). Three gate levels, eight gates.
// Interface: a = (a2,a1), b = (b2,b1) with index 0 holding a1/b1;
// r = (r4,r3,r2,r1). Combinational.
// Structure and signal names follow the school-book figure of the method;
// the bit ordering of the vectors is this design's choice.
module mult2x2_sb (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] r
);
  logic f1, f2, f3, c;

  assign r[0] = a[0] & b[0];
  assign f1   = a[0] & b[1];
  assign f2   = a[1] & b[0];
  assign f3   = a[1] & b[1];

  half_adder u_ha1 (.x(f1), .y(f2), .s(r[1]), .c(c));
  half_adder u_ha2 (.x(c),  .y(f3), .s(r[2]), .c(r[3]));
endmodule
