// Modulo 2^N+1 subtractor, d = |x - y| mod (2^N + 1), for N-bit x and y.
//
// With S = x + ~y + 1 (an N-bit carry-propagate adder with carry-in 1):
//   x >= y : the CPA carry cn is 1 and d = S;
//   x <  y : cn is 0 and d = S + 1 (= x - y + 2^N + 1).
// S + 1 is formed by the MUX-based incrementer; its active-low carry
// cout_n, inverted, is the top bit d[N] (S + 1 = 2^N only when S is all
// ones). The output MUX is steered by cn, which is also brought out: the
// residue-to-binary converter uses it to tell x1 >= x2 from x1 < x2.
//
// d is N+1 bits wide and lies in [0, 2^N]. Purely combinational.
//
// From the original design: S = x + ~y + 1, the incrementer for S + 1 and
// the output MUX. Own choice: which sense of cn to use. The description of
// the converter states both senses in different places; this design takes
// cn = 1 for x >= y, the plain carry out of the adder, which is also what
// the subtractor's own description says.
module mod_sub_2n1 #(
  parameter int unsigned N = 22
) (
  input  logic [N-1:0] x,
  input  logic [N-1:0] y,
  output logic [N:0]   d,
  output logic         cn
);
  logic [N-1:0] s, s_inc;
  logic         inc_cout_n;

  assign {cn, s} = {1'b0, x} + {1'b0, ~y} + (N+1)'(1);

  mux_incrementer #(.N(N)) u_inc (.z(s), .y(s_inc), .cout_n(inc_cout_n));

  assign d = cn ? {1'b0, s} : {~inc_cout_n, s_inc};
endmodule
