// Unsigned MUX-based decrementer, y = z - 1 (mod 2^N).
//
// Decrementing complements every bit from bit 0 up to and including the
// least significant one bit (LSOB) and leaves the bits above it alone; an
// all-zero input becomes all ones. The decision module (an OR chain over z)
// marks, for each bit j, whether any lower bit is one (d[j-1]); a 2:1 MUX per
// bit then passes z[j] (a one exists below) or ~z[j] (none does). Bit 0 is
// always inverted. There is no carry chain through adders: the critical path
// is one inverter, N-2 OR gates and two MUXes.
//
// cout_n = d[N-1] = OR of all input bits. It is LOW when a borrow leaves the
// MSB, i.e. when z == 0. This active-low convention follows the original
// design. Purely combinational.
//
// From the original design: all of the structure. Own choice: none.
module mux_decrementer #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] z,
  output logic [N-1:0] y,
  output logic         cout_n
);
  logic [N-1:0] d;

  lsob_dm #(.N(N)) u_dm (.a(z), .d(d));

  always_comb begin
    y[0] = ~z[0];
    for (int j = 1; j < N; j++) y[j] = d[j-1] ? z[j] : ~z[j];
  end

  assign cout_n = d[N-1];
endmodule
