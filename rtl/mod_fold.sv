// mod_fold: reduces a WS-bit sum s modulo P (P < 2**n, n = ceil(log2 P)).
// The bits above n are treated like one more sub-word: a Boolean function
// of them, g = (s[WS-1:n] * 2**n) mod P, is looked up (lut_func) and added
// to the low n bits. That sum is below 2**n + P < 3P, so two modular
// corrections (mod_correct) bring it below P.
// Interface: s (WS bits, WS > n) in, r (n bits) out. Combinational.
// The final "subtract P when R >= P" correction is the method's; folding the
// high bits through a table first is this design's choice, needed because
// a sum of several residues can reach many multiples of P.
module mod_fold #(
  parameter int unsigned WS = 12,
  parameter int unsigned P  = 241,
  localparam int unsigned N = $clog2(P)
) (
  input  logic [WS-1:0] s,
  output logic [N-1:0]  r
);
  localparam int unsigned WH = WS - N;
  localparam int unsigned NE = 2 ** WH;

  function automatic logic [N*NE-1:0] table_of();
    logic [N*NE-1:0] t;
    longint unsigned v;
    for (int unsigned e = 0; e < NE; e++) begin
      v = (longint'(e) * (longint'(1) << N)) % longint'(P);
      for (int unsigned o = 0; o < N; o++) begin
        t[o*NE + e] = v[o];
      end
    end
    return t;
  endfunction

  logic [N-1:0] g;
  logic [N+1:0] r0, r1, r2;

  lut_func #(.NI(WH), .NO(N), .TT(table_of())) u_hi (
    .x(s[WS-1:N]),
    .y(g)
  );

  assign r0 = (N+2)'(s[N-1:0]) + (N+2)'(g);

  mod_correct #(.W(N+2), .P(P)) u_c1 (.x(r0), .y(r1));
  mod_correct #(.W(N+2), .P(P)) u_c2 (.x(r1), .y(r2));

  assign r = r2[N-1:0];

  initial begin
    assert (WS > N) else $error("mod_fold: WS must exceed ceil(log2 P)");
  end
endmodule
