// Unsigned MUX-based incrementer, y = z + 1 (mod 2^N).
//
// Z + 1 equals the complement of (~Z - 1), so the decrementer structure is
// reused with the decision module fed by ~z: d[j-1] is then one when some
// bit below j is zero, and bit j keeps its value; otherwise (all lower bits
// one) it is inverted. Bit 0 is always inverted.
//
// cout_n = d[N-1] = OR of the inverted input bits. It is LOW when a carry
// leaves the MSB, i.e. when z is all ones (active-low, as in the source
// design). Purely combinational. Used in the converter for x1 + 1, for
// S + 1 in the modulo 2^N+1 subtractor and for h + 1 in the final CPA unit.
//
// From the original design: the structure and the flag taken from the last
// decision-module output. Own choice: none.
module mux_incrementer #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] z,
  output logic [N-1:0] y,
  output logic         cout_n
);
  logic [N-1:0] d;

  lsob_dm #(.N(N)) u_dm (.a(~z), .d(d));

  always_comb begin
    y[0] = ~z[0];
    for (int j = 1; j < N; j++) y[j] = d[j-1] ? z[j] : ~z[j];
  end

  assign cout_n = d[N-1];
endmodule
