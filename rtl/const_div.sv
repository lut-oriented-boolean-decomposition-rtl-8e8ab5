// const_div: divides X by a constant D, giving quotient q and residue r.
// Step 1: X is cut into delta-bit chunks X_k (delta = SW, by default
//         ceil(log2 D); the top chunk may be shorter), so
//         X = sum X_k * 2**(delta*k).
// Step 2: for every chunk one Boolean function (lut_func) gives
//         {Q_k, R_k} = X_k * 2**(delta*k) divided by D.
// Step 3: the residues are summed (adder tree), one more function divides
//         that small sum by D, {Q_t, r}, and q = sum Q_k + Q_t (adder tree).
// Example, D = 7, X = 489 = 111_101_001b: {64,0} + {5,5} + {0,1},
//         residue sum 6 -> {0,6}, q = 69, r = 6.
// Interface: x (WX bits, WX <= 64) in; q (WX bits), r (ceil(log2 D) bits)
// out. Combinational. The three steps are the method's; adder trees for
// the sums are this design's choice.
module const_div #(
  parameter int unsigned WX = 16,
  parameter int unsigned D  = 5,
  parameter int unsigned SW = $clog2(D),
  localparam int unsigned DR = $clog2(D)
) (
  input  logic [WX-1:0] x,
  output logic [WX-1:0] q,
  output logic [DR-1:0] r
);
  localparam int unsigned NS  = (WX + SW - 1) / SW;
  localparam int unsigned WRS = DR + $clog2(NS);      // residue sum width
  localparam int unsigned WF  = WX + DR;              // chunk function outputs
  localparam int unsigned WQ  = WX + $clog2(NS + 1);  // quotient tree output

  function automatic int unsigned width_of(input int unsigned i);
    return (WX - i*SW < SW) ? WX - i*SW : SW;
  endfunction

  // {R_k, Q_k} for a w-bit chunk k
  function automatic logic [WF*(2**SW)-1:0] chunk_table(input int unsigned k,
                                                        input int unsigned w);
    logic [WF*(2**SW)-1:0] t = '0;
    longint unsigned v;
    logic [WF-1:0] o;
    for (int unsigned e = 0; e < 2**w; e++) begin
      v = longint'(e) << (SW*k);
      o = {DR'(v % longint'(D)), WX'(v / longint'(D))};
      for (int unsigned b = 0; b < WF; b++) begin
        t[b*(2**w) + e] = o[b];
      end
    end
    return t;
  endfunction

  // {R, Q_t} for the residue sum
  function automatic logic [(WRS+DR)*(2**WRS)-1:0] sum_table();
    logic [(WRS+DR)*(2**WRS)-1:0] t;
    logic [WRS+DR-1:0] o;
    for (int unsigned e = 0; e < 2**WRS; e++) begin
      o = {DR'(e % D), WRS'(e / D)};
      for (int unsigned b = 0; b < WRS + DR; b++) begin
        t[b*(2**WRS) + e] = o[b];
      end
    end
    return t;
  endfunction

  logic [NS:0][WX-1:0]   qk;     // Q_0 .. Q_{NS-1}, then Q_t
  logic [NS-1:0][DR-1:0] rk;
  logic [WRS-1:0]        rsum;
  logic [WRS-1:0]        qt;
  logic [WQ-1:0]         qsum;

  for (genvar k = 0; k < NS; k++) begin : g_chunk
    localparam int unsigned WK = width_of(k);
    localparam logic [WF*(2**SW)-1:0] TTK = chunk_table(k, WK);
    lut_func #(.NI(WK), .NO(WF), .TT(TTK[WF*(2**WK)-1:0])) u_map (
      .x(x[k*SW +: WK]),
      .y({rk[k], qk[k]})
    );
  end

  adder_tree #(.NIN(NS), .W(DR)) u_rsum (.in(rk), .sum(rsum));

  lut_func #(.NI(WRS), .NO(WRS + DR), .TT(sum_table())) u_rdiv (
    .x(rsum),
    .y({r, qt})
  );

  assign qk[NS] = WX'(qt);

  adder_tree #(.NIN(NS + 1), .W(WX)) u_qsum (.in(qk), .sum(qsum));

  assign q = qsum[WX-1:0];
endmodule
