// The N-bit 1's complement adder unit of the N1 converter. It produces
//   h = |Z - 1|  mod 2^N-1   when cn = 0 (x1 < x2, x2 < 2^N)
//   h = |Z|      mod 2^N-1   when cn = 1 and x2 < 2^N (x1 >= x2)
//   h = |Z'|     mod 2^N-1   when x2 = 2^N (cn is then 1)
// with Z = T1 + T2 + T3 and Z' = T1 + (2^(N-1)-1) + T3 (see csa_mux_unit).
//
// Structure: carry-save row with operand MUX (csa_mux_unit), 1's complement
// adder (ones_comp_adder), MUX-based modulo 2^N-1 decrementer on its output,
// and a final N-bit MUX steered by cn, the carry out of the modulo 2^N+1
// subtractor in the modulo subtraction unit. The decrement runs in parallel
// with nothing else; it follows the adder, so the path is FA row + two
// adders + OR chain + two MUXes. h lies in [0, 2^N-2]. Purely combinational.
//
// From the original design: the chain of units and the final MUX. Own
// choice: none beyond the single-zero adder inside ones_comp_adder.
module ones_comp_adder_unit #(
  parameter int unsigned N = 22
) (
  input  logic [N-1:0] x1,
  input  logic [N:0]   x2,
  input  logic [N-1:0] x3,
  input  logic         cn,
  output logic [N-1:0] h
);
  logic [N-1:0] c, s, zsum, zdec;

  csa_mux_unit         #(.N(N)) u_nfa (.x1(x1), .x2(x2), .x3(x3), .c(c), .s(s));
  ones_comp_adder      #(.N(N)) u_oca (.s(s), .c(c), .z(zsum));
  mod_decrementer      #(.N(N)) u_dec (.z(zsum), .y(zdec));

  assign h = cn ? zsum : zdec;
endmodule
