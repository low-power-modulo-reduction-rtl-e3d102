// Modulo 2^N-1 incrementer with a single representation of zero,
// y = |z + 1| mod (2^N - 1), y in [0, 2^N-2] for z in [0, 2^N-2].
//
// The double-zero incrementer returns 1..1 only for z = 2^N-2 (pattern
// 1..10). An N-input AND of ~z[0], z[1], ..., z[N-1] detects that input and
// a data-select MUX array then inverts the result to 0..0. All other inputs
// pass unchanged. An all-ones input (the other code for zero) gives 0..01.
// Purely combinational.
//
// From the original design: the AND detector and the inverting MUX array
// after the double-zero incrementer. Own choice: none.
module mod_incrementer #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] z,
  output logic [N-1:0] y
);
  logic [N-1:0] ydz;
  logic         wrap;

  mod_incrementer_dz #(.N(N)) u_inc (.z(z), .y(ydz));

  assign wrap = ~z[0] & (&z[N-1:1]);
  assign y    = wrap ? ~ydz : ydz;   // data-select MUX array
endmodule
