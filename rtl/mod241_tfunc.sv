// mod241_tfunc: the partial product ((a8 a7) * (b8 b7) * 240) mod 241 of the
// mod-241 multiplier, T = (t8..t1), hand-mapped onto three fractured LUTs.
// With x1..x4 = a8, a7, b8, b7 and x6 tied to 1, each lut6_2 computes two
// 4-input functions:
//   LUT A: t1 = a8(b8~b7 | ~a7 b7) | a7 b8 ~b7,
//          t2 = a8 b7(~a7 | ~b8) | a7 b8(~a8 | ~b7)
//   LUT B: t3 = a8(~b8 b7 | ~a7 b8 ~b7) | ~a8 a7 b8,
//          t4 = a8(b8 | b7) | a7 b8
//   LUT C: t5 = ~a8 a7 ~b8 b7,  t6 = t7 = t8 = (a8 | a7)(b8 | b7)
// Three cells instead of four because t6, t7 and t8 are one function.
// Interface: ah = (a8,a7), bh = (b8,b7), index 1 the upper bit; t[0] = t1.
// Combinational. Equations and LUT pairing follow the method's example;
// the LUT initialisation is derived from the equations at elaboration.
module mod241_tfunc (
  input  logic [1:0] ah,
  input  logic [1:0] bh,
  output logic [7:0] t
);
  // Value of t_n for LUT address k, with k[0] = a8, k[1] = a7, k[2] = b8,
  // k[3] = b7.
  function automatic logic tbit(input int unsigned n, input logic [3:0] k);
    logic a8, a7, b8, b7;
    a8 = k[0]; a7 = k[1]; b8 = k[2]; b7 = k[3];
    case (n)
      1: return (a8 & ((b8 & ~b7) | (~a7 & b7))) | (a7 & b8 & ~b7);
      2: return (a8 & b7 & (~a7 | ~b8)) | (a7 & b8 & (~a8 | ~b7));
      3: return (a8 & ((~b8 & b7) | (~a7 & b8 & ~b7))) | (~a8 & a7 & b8);
      4: return (a8 & (b8 | b7)) | (a7 & b8);
      5: return ~a8 & a7 & ~b8 & b7;
      default: return (a8 | a7) & (b8 | b7);
    endcase
  endfunction

  function automatic logic [63:0] init_pair(input int unsigned n_lo, input int unsigned n_hi);
    logic [63:0] s;
    for (int unsigned k = 0; k < 32; k++) begin
      s[k]      = tbit(n_lo, 4'(k));
      s[32 + k] = tbit(n_hi, 4'(k));
    end
    return s;
  endfunction

  logic [5:0] xin;
  logic       t678;

  assign xin = {2'b10, bh[0], bh[1], ah[0], ah[1]};

  lut6_2 #(.INIT(init_pair(1, 2))) u_lut_a (.x(xin), .y1(t[0]), .y2(t[1]));
  lut6_2 #(.INIT(init_pair(3, 4))) u_lut_b (.x(xin), .y1(t[2]), .y2(t[3]));
  lut6_2 #(.INIT(init_pair(5, 6))) u_lut_c (.x(xin), .y1(t[4]), .y2(t678));

  assign t[7:5] = {3{t678}};
endmodule
