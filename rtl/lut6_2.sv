// lut6_2: fracturable 6-input look-up table, the cell all Boolean functions
// of this design are mapped to.
// Two 5-input tables read x1..x5. The first, INIT[31:0], drives y1. A
// multiplexer controlled by x6 drives y2: x6 = 0 passes the first table,
// x6 = 1 the second, INIT[63:32]. So the cell computes either one 6-input
// function (on y2, table INIT indexed by {x6..x1}) or, with x6 tied to 1,
// two independent 5-input functions of the same five inputs (y1 and y2).
// Interface: x[0] = x1 ... x[5] = x6. Combinational.
// The two-table-plus-multiplexer structure is the one the method targets;
// which multiplexer input x6 = 1 selects and the INIT encoding are this
// design's choice (they match the usual FPGA convention).
module lut6_2 #(
  parameter logic [63:0] INIT = 64'h0
) (
  input  logic [5:0] x,
  output logic       y1,
  output logic       y2
);
  logic lo, hi;

  assign lo = INIT[{1'b0, x[4:0]}];
  assign hi = INIT[{1'b1, x[4:0]}];
  assign y1 = lo;
  assign y2 = x[5] ? hi : lo;
endmodule
