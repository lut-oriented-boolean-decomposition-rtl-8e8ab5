// mult2x2_dnf: 2-bit x 2-bit unsigned multiplier from a minimized
// disjunctive normal form (AND/OR with inverted inputs).
//   r1 = a1 b1            r2 = h1 | h2 with h1 = (~a2|~b1)(a1 b2),
//                                         h2 = (~a1|~b2)(a2 b1)
//   r3 = (~a1|~b1)(a2 b2) r4 = r1 (a2 b2)
// Three gate levels, twelve gates. Combinational.
// Interface: a = (a2,a1), b = (b2,b1), r = (r4..r1), index 0 = subscript 1.
// The equations are the method's DNF example; vector packing is this
// design's choice.
module mult2x2_dnf (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] r
);
  logic f1, f2, f3, f4, f5, f6, h1, h2;

  assign f1 = ~a[1] | ~b[0];
  assign f2 =  a[0] &  b[1];
  assign f3 = ~a[0] | ~b[1];
  assign f4 =  a[1] &  b[0];
  assign f5 = ~a[0] | ~b[0];
  assign f6 =  a[1] &  b[1];
  assign h1 = f1 & f2;
  assign h2 = f3 & f4;

  assign r[0] = a[0] & b[0];
  assign r[1] = h1 | h2;
  assign r[2] = f5 & f6;
  assign r[3] = r[0] & f6;
endmodule
