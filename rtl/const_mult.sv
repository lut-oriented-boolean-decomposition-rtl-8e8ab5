// const_mult: multiplies a WA-bit variable a by a WC-bit constant C.
// a is cut into SW-bit sub-words A_i (the top one may be shorter). Each
// A_i * C is one Boolean function of at most SW inputs (a 5- or 6-input
// LUT per output bit, lut_func); its result is shifted by SW*i and the
// shifted products are summed by a balanced adder tree.
// Interface: a (WA bits) in, r = a * C (WA + WC bits) out. Combinational.
// The split into <= 6-input functions follows the method; splitting only
// the variable, never the constant, is this design's choice.
module const_mult #(
  parameter int unsigned       WA = 7,
  parameter int unsigned       WC = 29,
  parameter logic [WC-1:0]     C  = 29'd536870909,
  parameter int unsigned       SW = 6,
  localparam int unsigned      WR = WA + WC
) (
  input  logic [WA-1:0] a,
  output logic [WR-1:0] r
);
  localparam int unsigned NS = (WA + SW - 1) / SW;
  localparam int unsigned WP = WC + SW;

  function automatic int unsigned width_of(input int unsigned i);
    return (WA - i*SW < SW) ? WA - i*SW : SW;
  endfunction

  // truth table of y = x * C over the 2**SW sub-word values
  function automatic logic [WP*(2**SW)-1:0] table_of();
    logic [WP*(2**SW)-1:0] t;
    logic [WP-1:0]         v;
    for (int unsigned e = 0; e < 2**SW; e++) begin
      v = WP'(e) * WP'(C);
      for (int unsigned o = 0; o < WP; o++) begin
        t[o*(2**SW) + e] = v[o];
      end
    end
    return t;
  endfunction

  localparam logic [WP*(2**SW)-1:0] TT = table_of();

  // table restricted to a sub-word of w bits: entries 0 .. 2**w-1 of each
  // output (the outputs above WC + w are constant 0 and dropped)
  function automatic logic [(WC+SW)*(2**SW)-1:0] table_w(input int unsigned w);
    logic [(WC+SW)*(2**SW)-1:0] t = '0;
    for (int unsigned o = 0; o < WC + w; o++) begin
      for (int unsigned e = 0; e < 2**w; e++) begin
        t[o*(2**w) + e] = TT[o*(2**SW) + e];
      end
    end
    return t;
  endfunction

  logic [NS-1:0][WR-1:0]          term;
  

  for (genvar i = 0; i < NS; i++) begin : g_sub
    localparam int unsigned WI = width_of(i);
    localparam logic [(WC+SW)*(2**SW)-1:0] TTI = table_w(WI);
    logic [WC+WI-1:0] p;
    lut_func #(
      .NI(WI), .NO(WC + WI), .TT(TTI[(WC+WI)*(2**WI)-1:0])
    ) u_map (
      .x(a[i*SW +: WI]),
      .y(p)
    );
    assign term[i] = WR'(p) << (i*SW);
  end

  if (NS == 1) begin : g_single
    assign r = term[0];
  end else begin : g_tree
    logic [WR+$clog2(NS)-1:0] sum;
    adder_tree #(.NIN(NS), .W(WR)) u_tree (.in(term), .sum(sum));
    assign r = sum[WR-1:0];
  end
endmodule
