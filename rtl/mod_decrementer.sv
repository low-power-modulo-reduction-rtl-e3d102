// Modulo 2^N-1 decrementer, y = |z - 1| mod (2^N - 1).
//
// Binary and modulo 2^N-1 decrement agree for every z except z = 0, where
// the binary result is 1..11 and the modulo result is 1..10: they differ only
// in bit 0. So this unit is the binary MUX-based decrementer with its bit-0
// inverter turned into a MUX: y[0] is the binary result bit (~z[0]) when
// cout_n is high and its complement (z[0]) when it is low; cout_n
// (OR of all input bits) is low only for z = 0.
//
// An all-ones input is the second code for zero and yields 1..10 as well.
// For z in [0, 2^N-2] the result lies in [0, 2^N-2]. Purely combinational.
//
// From the original design: reuse of the binary decrementer and the bit-0
// MUX. Own choice: none.
module mod_decrementer #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] z,
  output logic [N-1:0] y
);
  logic [N-1:0] yb;
  logic         nz;

  mux_decrementer #(.N(N)) u_dec (.z(z), .y(yb), .cout_n(nz));

  assign y = {yb[N-1:1], nz ? yb[0] : ~yb[0]};
endmodule
