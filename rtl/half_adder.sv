// half_adder: one-bit half adder, s = x XOR y, c = x AND y.
// It is the HA box of the school-book 2x2 multiplier, drawn there as one XOR
// and one AND gate. Purely combinational, no clock.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,
  output logic c
);
  assign s = x ^ y;
  assign c = x & y;
endmodule
