// pp_func: one partial product of the decomposed modular multiplier,
// g(a, b) = (a * b * C) mod P, as a Boolean function of the WA + WB
// sub-word bits. P = 0 means no modulus: g = a * b * C (used by the plain
// multiplier).
// The truth table is computed when the design is elaborated and handed to
// lut_func, which maps it onto 6-input LUT cells; no multiplier or adder is
// built. C already carries the sub-word weight, e.g. 2**(SW*(i+j)) mod P.
// Interface: a (WA bits), b (WB bits) in; g (WO bits) out, g < P.
// Combinational. Reducing each partial product mod P inside its table
// follows the method's worked examples; the table-then-LUT flow stands in
// for the Boolean minimizer the method uses.
module pp_func #(
  parameter int unsigned WA = 3,
  parameter int unsigned WB = 3,
  parameter int unsigned C  = 8,
  parameter int unsigned P  = 241,
  parameter int unsigned WO = 8
) (
  input  logic [WA-1:0] a,
  input  logic [WB-1:0] b,
  output logic [WO-1:0] g
);
  localparam int unsigned NI = WA + WB;
  localparam int unsigned NE = 2 ** NI;

  function automatic logic [WO*NE-1:0] table_of();
    logic [WO*NE-1:0] t;
    longint unsigned av, bv, v;
    for (int unsigned e = 0; e < NE; e++) begin
      av = longint'(e) % longint'(2 ** WA);
      bv = longint'(e) / longint'(2 ** WA);
      v  = (P == 0) ? av * bv * longint'(C)
                    : (av * bv * longint'(C)) % longint'(P);
      for (int unsigned o = 0; o < WO; o++) begin
        t[o*NE + e] = v[o];
      end
    end
    return t;
  endfunction

  lut_func #(.NI(NI), .NO(WO), .TT(table_of())) u_map (
    .x({b, a}),
    .y(g)
  );
endmodule
