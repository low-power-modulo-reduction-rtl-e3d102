// Addition unit "nFA" of the N1 residue-to-binary converter: one row of N
// full adders (carry-save) with a MUX on the second operand.
//
// Operands (all N bits, modulo 2^N-1 quantities):
//   T1 = ~x1                                 = |-x1|        mod 2^N-1
//   T2 = {x2[0], x2[N-1:1]}  (rotate right)  = |2^(N-1) x2| mod 2^N-1
//   T3 = {x3[0], x3[N-1:1]}  (rotate right)  = |2^(N-1) x3| mod 2^N-1
// When x2 = 2^N (x2[N] = 1) the second operand is replaced by the constant
// 2^(N-1)-1 = 0 1..1, one MUX per bit. Both cases thus share one adder row.
//
// Outputs: s[i] = sum and c[i] = carry of the full adder at bit i. c[i] has
// weight 2^(i+1); the following 1's complement adder wraps c[N-1] to bit 0.
// S + 2C equals T1 + T2 + T3 (or T1 + 2^(N-1)-1 + T3). Purely combinational.
//
// From the original design: the rotations, the inversion, the constant
// 2^(N-1)-1 and the per-bit placement of the MUXes. Own choice: none beyond
// writing the full adders as sum/majority equations.
module csa_mux_unit #(
  parameter int unsigned N = 22
) (
  input  logic [N-1:0] x1,
  input  logic [N:0]   x2,
  input  logic [N-1:0] x3,
  output logic [N-1:0] c,
  output logic [N-1:0] s
);
  logic [N-1:0] t1, t2, t3, m;

  assign t1 = ~x1;
  assign t2 = {x2[0], x2[N-1:1]};
  assign t3 = {x3[0], x3[N-1:1]};
  assign m  = x2[N] ? {1'b0, {(N-1){1'b1}}} : t2;

  assign s = t1 ^ m ^ t3;
  assign c = (t1 & m) | (t1 & t3) | (m & t3);
endmodule
