// N-bit 1's complement (modulo 2^N-1) adder for a carry-save pair.
//
// z = (s + 2*c) mod (2^N - 1), with z in [0, 2^N-2] (single zero).
//
// Doubling c modulo 2^N-1 is a left rotation, so the carry word enters as
// {c[N-2:0], c[N-1]}: the top carry of the full-adder row wraps round to
// bit 0. The two addends a and b are then added twice in parallel, as
// a + b and a + b + 1. If the second sum carries out of N bits then
// a + b >= 2^N-1 and its low N bits are the reduced result; otherwise a + b
// is already below 2^N-1 and is taken as is. This keeps the all-ones code
// for zero out of the result, which the converter's final addition needs.
// The delay is about that of two N-bit adders, as budgeted for this unit.
// The only input that would still give all ones (a and b both all ones) does
// not arise from residues in range. Purely combinational.
//
// From the original design: that a 1's complement adder follows the
// carry-save row, and its delay budget of two adders. Own choice: its
// insides (the two parallel sums and the select), which are not given.
module ones_comp_adder #(
  parameter int unsigned N = 22
) (
  input  logic [N-1:0] s,
  input  logic [N-1:0] c,
  output logic [N-1:0] z
);
  logic [N-1:0] a, b;
  logic [N-1:0] sum0;
  logic [N:0]   sum1;

  assign a    = s;
  assign b    = {c[N-2:0], c[N-1]};
  assign sum0 = a + b;
  assign sum1 = {1'b0, a} + {1'b0, b} + (N+1)'(1);
  assign z    = sum1[N] ? sum1[N-1:0] : sum0[N-1:0];
endmodule
