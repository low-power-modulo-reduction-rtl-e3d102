// Modulo subtraction unit of the N1 converter.
//
//   x2 < 2^N (x2[N] = 0): k = |x1 - x2| mod 2^N+1, from mod_sub_2n1 fed
//                         with the low N bits of x2
//   x2 = 2^N (x2[N] = 1): k = x1 + 1, from the MUX-based incrementer, with
//                         k[N] = inverted active-low carry of the incrementer
// k is N+1 bits wide, in [0, 2^N]. cn is the subtractor's CPA carry (1 when
// x1 >= x2[N-1:0]); it steers the 1's complement adder unit. When x2 = 2^N
// the subtractor sees x2[N-1:0] = 0, so cn is 1 then as well.
// Purely combinational.
//
// From the original design: subtractor, incrementer and the output MUX
// steered by x2[N]. Own choice: none.
module mod_sub_unit #(
  parameter int unsigned N = 22
) (
  input  logic [N-1:0] x1,
  input  logic [N:0]   x2,
  output logic [N:0]   k,
  output logic         cn
);
  logic [N:0]   d;
  logic [N-1:0] x1_inc;
  logic         inc_cout_n;

  mod_sub_2n1     #(.N(N)) u_sub (.x(x1), .y(x2[N-1:0]), .d(d), .cn(cn));
  mux_incrementer #(.N(N)) u_inc (.z(x1), .y(x1_inc), .cout_n(inc_cout_n));

  assign k = x2[N] ? {~inc_cout_n, x1_inc} : d;
endmodule
