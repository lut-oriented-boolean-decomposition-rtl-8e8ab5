// modmul: modular multiplier r = (a * b) mod P by sub-word decomposition.
// a and b are cut, from the least significant bit, into NS = ceil(N/SW)
// sub-words of SW bits (the top one may be shorter). The product is the sum
// over all pairs of A_i * B_j * 2**(SW*(i+j)); each term, with its weight
// reduced mod P, is one Boolean function of at most 2*SW inputs,
// g_ij = (A_i * B_j * (2**(SW*(i+j)) mod P)) mod P, mapped to LUTs (pp_func).
// The NS*NS residues are summed by a balanced adder tree and reduced to
// [0, P) by mod_fold.
// For the P = 241, N = 8, SW = 3 configuration the (a8 a7)(b8 b7)*240 term is
// the hand-mapped three-LUT function mod241_tfunc.
// Interface: a, b (N bits, both < 2**N; they need not be below P);
// r (ceil(log2 P) bits). Combinational, no clock.
// Decomposition, sub-word split and per-term reduction follow the method's
// mod-241 and mod-3329 examples; the final fold is this design's choice.
module modmul #(
  parameter int unsigned N  = 8,
  parameter int unsigned SW = 3,
  parameter int unsigned P  = 241,
  localparam int unsigned WO = $clog2(P)
) (
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  output logic [WO-1:0] r
);
  localparam int unsigned NS  = (N + SW - 1) / SW;
  localparam int unsigned NPP = NS * NS;
  localparam int unsigned WT  = WO + $clog2(NPP);

  function automatic int unsigned width_of(input int unsigned i);
    return (N - i*SW < SW) ? N - i*SW : SW;
  endfunction

  function automatic int unsigned weight_of(input int unsigned sh);
    longint unsigned v = 1;
    for (int unsigned k = 0; k < sh; k++) v = (v * 2) % longint'(P);
    return int'(v);
  endfunction

  localparam bit HAND_T241 = (P == 241) && (N == 8) && (SW == 3);

  logic [NPP-1:0][WO-1:0] pp;
  logic [WT-1:0]          sum;

  for (genvar i = 0; i < NS; i++) begin : g_a
    for (genvar j = 0; j < NS; j++) begin : g_b
      localparam int unsigned WI = width_of(i);
      localparam int unsigned WJ = width_of(j);
      if (HAND_T241 && i == 2 && j == 2) begin : g_t241
        mod241_tfunc u_t (
          .ah(a[N-1 -: 2]),
          .bh(b[N-1 -: 2]),
          .t (pp[i*NS + j])
        );
      end else begin : g_pp
        pp_func #(
          .WA(WI), .WB(WJ), .C(weight_of(SW*(i + j))), .P(P), .WO(WO)
        ) u_pp (
          .a(a[i*SW +: WI]),
          .b(b[j*SW +: WJ]),
          .g(pp[i*NS + j])
        );
      end
    end
  end

  adder_tree #(.NIN(NPP), .W(WO)) u_tree (.in(pp), .sum(sum));

  mod_fold #(.WS(WT), .P(P)) u_fold (.s(sum), .r(r));
endmodule
