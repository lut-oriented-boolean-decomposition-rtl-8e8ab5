// lut_func: maps a multi-output Boolean function, given as a truth table,
// onto fracturable 6-input LUT cells (lut6_2).
// TT holds output o for input value v at bit TT[o*2**NI + v].
// Mapping rules:
//   NI <= 5 : outputs are taken two at a time; one cell computes both as two
//             5-input functions (x6 tied to 1). Unused inputs are tied to 0.
//   NI == 6 : one cell per output, used as a 6-input function.
//   NI >  6 : each output is split (Shannon expansion) into 2**(NI-6)
//             6-input subfunctions of x[5:0]; the upper variables x[NI-1:6]
//             select among them through a multiplexer.
// Interface: x (NI bits) in, y (NO bits) out. Combinational.
// The 5/6-input rules follow the method's LUT-mapping step; splitting wider
// functions by Shannon expansion on the upper inputs is this design's choice.
// The default table is the 2x2 multiplier (x = {b, a}, y = a*b).
module lut_func #(
  parameter int unsigned             NI = 4,
  parameter int unsigned             NO = 4,
  parameter logic [NO*(2**NI)-1:0]   TT = 64'h80004c006ac0a0a0
) (
  input  logic [NI-1:0] x,
  output logic [NO-1:0] y
);
  localparam int unsigned NE = 2 ** NI;

  // 32-entry slice of output o, replicated when the function has fewer
  // than five inputs (the replicated entries are never addressed).
  function automatic logic [31:0] slice5(input int unsigned o);
    logic [31:0] sl;
    for (int unsigned k = 0; k < 32; k++) begin
      sl[k] = (o < NO) ? TT[o*NE + (k % NE)] : 1'b0;
    end
    return sl;
  endfunction

  function automatic logic [63:0] slice6(input int unsigned o, input int unsigned base);
    logic [63:0] sl;
    for (int unsigned k = 0; k < 64; k++) begin
      sl[k] = TT[o*NE + base + k];
    end
    return sl;
  endfunction

  if (NI <= 5) begin : g_dual5
    localparam int unsigned NL = (NO + 1) / 2;
    logic [5:0]    xin;
    logic [NL-1:0] ya, yb;

    assign xin = 6'(x) | 6'b100000;

    for (genvar k = 0; k < NL; k++) begin : g_lut
      lut6_2 #(.INIT({slice5(2*k + 1), slice5(2*k)})) u_lut (
        .x (xin),
        .y1(ya[k]),
        .y2(yb[k])
      );
      assign y[2*k] = ya[k];
      if (2*k + 1 < NO) begin : g_odd
        assign y[2*k + 1] = yb[k];
      end
    end
  end else if (NI == 6) begin : g_single6
    for (genvar o = 0; o < NO; o++) begin : g_out
      logic unused_y1;
      lut6_2 #(.INIT(slice6(o, 0))) u_lut (
        .x (x),
        .y1(unused_y1),
        .y2(y[o])
      );
    end
  end else begin : g_shannon
    localparam int unsigned NL = 2 ** (NI - 6);
    for (genvar o = 0; o < NO; o++) begin : g_out
      logic [NL-1:0] leaf, unused_y1;
      for (genvar j = 0; j < NL; j++) begin : g_leaf
        lut6_2 #(.INIT(slice6(o, j*64))) u_lut (
          .x (x[5:0]),
          .y1(unused_y1[j]),
          .y2(leaf[j])
        );
      end
      assign y[o] = leaf[x[NI-1:6]];
    end
  end
endmodule
