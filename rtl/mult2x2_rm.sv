// mult2x2_rm: 2-bit x 2-bit unsigned multiplier in Reed-Muller (AND/XOR)
// form: f1 = a1 b1, f2 = a2 b2, f3 = a1 b2, f4 = a2 b1,
// r1 = f1, r2 = f3 ^ f4, r4 = f1 f2, r3 = r4 ^ f2.
// Three gate levels, seven gates. Combinational.
// Interface: a = (a2,a1), b = (b2,b1), r = (r4..r1), index 0 = subscript 1.
// The equations are the method's Reed-Muller example; vector packing is
// this design's choice.
module mult2x2_rm (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] r
);
  logic f1, f2, f3, f4;

  assign f1 = a[0] & b[0];
  assign f2 = a[1] & b[1];
  assign f3 = a[0] & b[1];
  assign f4 = a[1] & b[0];

  assign r[0] = f1;
  assign r[1] = f3 ^ f4;
  assign r[3] = f1 & f2;
  assign r[2] = r[3] ^ f2;
endmodule
