// mult_decomp: unsigned N x N multiplier r = a * b built by the same
// decomposition, without a modulus.
// a and b are cut from the LSB into NS = ceil(N/SW) sub-words of SW bits
// (the top one may be shorter). Every product A_i * B_j is one Boolean
// function of at most 2*SW inputs (pp_func with P = 0), weighted by
// 2**(SW*(i+j)).
// Result integration: the diagonal products A_i * B_i occupy the disjoint
// bit fields [2*SW*i +: 2*SW] and are therefore concatenated, not added.
// The off-diagonal products are shifted into place, and a balanced adder
// tree adds them to the concatenated word.
// Interface: a, b (N bits) in, r (2N bits) out. Combinational.
// The split into small products, the concatenation and the adder tree
// follow the method; the default size (8 bits, 4-bit sub-words, so every
// partial product has eight inputs) is this design's choice.
module mult_decomp #(
  parameter int unsigned N  = 8,
  parameter int unsigned SW = 4
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] r
);
  localparam int unsigned NS  = (N + SW - 1) / SW;
  localparam int unsigned NOD = NS * (NS - 1);     // off-diagonal products

  function automatic int unsigned width_of(input int unsigned i);
    return (N - i*SW < SW) ? N - i*SW : SW;
  endfunction

  // position of the off-diagonal product (i, j) in the operand list
  function automatic int unsigned od_index(input int unsigned i, input int unsigned j);
    return i * (NS - 1) + ((j < i) ? j : j - 1);
  endfunction

  logic [2*N-1:0] diag;

  for (genvar i = 0; i < NS; i++) begin : g_diag
    localparam int unsigned WI = width_of(i);
    pp_func #(.WA(WI), .WB(WI), .C(1), .P(0), .WO(2*WI)) u_pp (
      .a(a[i*SW +: WI]),
      .b(b[i*SW +: WI]),
      .g(diag[2*SW*i +: 2*WI])
    );
  end

  if (NS == 1) begin : g_single
    assign r = diag;
  end else begin : g_multi
    logic [NOD:0][2*N-1:0]          ops;
    logic [2*N+$clog2(NOD+1)-1:0]   sum;

    assign ops[NOD] = diag;

    for (genvar i = 0; i < NS; i++) begin : g_a
      for (genvar j = 0; j < NS; j++) begin : g_b
        if (i != j) begin : g_od
          localparam int unsigned WI = width_of(i);
          localparam int unsigned WJ = width_of(j);
          logic [WI+WJ-1:0] p;
          pp_func #(.WA(WI), .WB(WJ), .C(1), .P(0), .WO(WI + WJ)) u_pp (
            .a(a[i*SW +: WI]),
            .b(b[j*SW +: WJ]),
            .g(p)
          );
          assign ops[od_index(i, j)] = (2*N)'(p) << (SW*(i + j));
        end
      end
    end

    adder_tree #(.NIN(NOD + 1), .W(2*N)) u_tree (.in(ops), .sum(sum));

    assign r = sum[2*N-1:0];
  end
endmodule
