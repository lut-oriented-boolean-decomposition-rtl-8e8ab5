// modred: reduces a wide WA-bit operand modulo P, r = a mod P.
// a is cut into SW-bit sub-words A_i (the top one may be shorter). Each
// sub-word with its weight gives one Boolean function of at most SW inputs,
// g_i = (A_i * (2**(SW*i) mod P)) mod P, mapped to LUTs (lut_func). The
// residues are summed by a balanced adder tree and mod_fold reduces the sum
// to [0, P).
// Interface: a (WA bits) in, r (ceil(log2 P) bits) out. Combinational.
// The sub-word decomposition into <= 6-input functions follows the method;
// the exact arrangement of this operation is this design's own.
module modred #(
  parameter int unsigned WA = 168,
  parameter int unsigned P  = 241,
  parameter int unsigned SW = 6,
  localparam int unsigned WO = $clog2(P)
) (
  input  logic [WA-1:0] a,
  output logic [WO-1:0] r
);
  localparam int unsigned NS = (WA + SW - 1) / SW;
  localparam int unsigned WT = WO + $clog2(NS);

  function automatic int unsigned width_of(input int unsigned i);
    return (WA - i*SW < SW) ? WA - i*SW : SW;
  endfunction

  // truth table of (x * 2**(SW*i)) mod P for a w-bit sub-word x
  function automatic logic [WO*(2**SW)-1:0] table_of(input int unsigned i,
                                                     input int unsigned w);
    logic [WO*(2**SW)-1:0] t = '0;
    longint unsigned wt = 1, v;
    for (int unsigned k = 0; k < SW*i; k++) wt = (wt * 2) % longint'(P);
    for (int unsigned e = 0; e < 2**w; e++) begin
      v = (longint'(e) * wt) % longint'(P);
      for (int unsigned o = 0; o < WO; o++) begin
        t[o*(2**w) + e] = v[o];
      end
    end
    return t;
  endfunction

  logic [NS-1:0][WO-1:0] res;
  logic [WT-1:0]         sum;

  for (genvar i = 0; i < NS; i++) begin : g_sub
    localparam int unsigned WI = width_of(i);
    localparam logic [WO*(2**SW)-1:0] TTI = table_of(i, WI);
    lut_func #(.NI(WI), .NO(WO), .TT(TTI[WO*(2**WI)-1:0])) u_map (
      .x(a[i*SW +: WI]),
      .y(res[i])
    );
  end

  adder_tree #(.NIN(NS), .W(WO)) u_tree (.in(res), .sum(sum));

  mod_fold #(.WS(WT), .P(P)) u_fold (.s(sum), .r(r));
endmodule
