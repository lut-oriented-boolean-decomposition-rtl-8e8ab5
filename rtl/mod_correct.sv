// mod_correct: modular correction step, y = x - P when x >= P, else x.
// One comparator and one subtractor feeding a multiplexer.
// Interface: x, y are W bits. Combinational. The rule is the method's
// result-integration step.
module mod_correct #(
  parameter int unsigned W = 9,
  parameter int unsigned P = 241
) (
  input  logic [W-1:0] x,
  output logic [W-1:0] y
);
  localparam logic [W-1:0] PW = W'(P);

  assign y = (x >= PW) ? x - PW : x;
endmodule
