// Residue-to-binary converter for the moduli set {2^N, 2^N+1, 2^N-1}.
//
// Inputs are the residues x1 = |X| mod 2^N, x2 = |X| mod 2^N+1 (N+1 bits,
// in [0, 2^N]) and x3 = |X| mod 2^N-1 (in [0, 2^N-2]). The output is
// X = x1 + 2^N * Y, 0 <= X < 2^N (2^2N - 1), that is x = {Y, x1}.
//
// The usual formulation needs Y modulo (2^N+1)(2^N-1) = 2^2N - 1, a 2N-bit
// end-around-carry addition. Here the modulo reduction technique splits that
// into two independent N-bit residues:
//   Y = (2^N+1) * h + k,
//   h = |2^(N-1) x2 + 2^(N-1) x3 - x1 - [x1 < x2]|  mod 2^N-1
//       (with 2^(N-1) 2^N replaced by 2^(N-1)-1 and the -1 dropped when
//        x2 = 2^N),
//   k = |x1 - x2| mod 2^N+1  (x1 + 1 when x2 = 2^N).
// Multiplying by 2^(N-1) modulo 2^N-1 is a rotation and negation is a bit
// inversion, so h needs one carry-save row and one 1's complement adder; the
// "- 1" is a MUX-based modulo decrementer chosen by the subtractor's carry.
//
// Three units, as in the block diagram: ones_comp_adder_unit (h),
// mod_sub_unit (k and the carry cn that selects the decremented h) and
// cpa_unit (Y from h and k with one N-bit adder plus an incrementer).
// Purely combinational: no clock, one conversion per evaluation.
//
// From the original design: the split into h and k, the three units and
// their wiring. Own choice: N = 22 as default, the smallest N whose range
// exceeds 2^64 (a 64-bit dynamic range is the larger size the design is
// quoted for). The low N output bits are x1 itself, wired through with no
// logic: that is the point of the method, not an oversight.
module rb_converter_n1 #(
  parameter int unsigned N = 22
) (
  input  logic [N-1:0]   x1,
  input  logic [N:0]     x2,
  input  logic [N-1:0]   x3,
  output logic [3*N-1:0] x
);
  logic [N-1:0]   h;
  logic [N:0]     k;
  logic           cn;
  logic [2*N-1:0] y;

  ones_comp_adder_unit #(.N(N)) u_h   (.x1(x1), .x2(x2), .x3(x3), .cn(cn), .h(h));
  mod_sub_unit         #(.N(N)) u_k   (.x1(x1), .x2(x2), .k(k), .cn(cn));
  cpa_unit             #(.N(N)) u_cpa (.h(h), .k(k), .y(y));

  assign x = {y, x1};
endmodule
