// Modulo 2^N-1 incrementer with double representation of zero,
// y = |z + 1| mod (2^N - 1), where zero may come out as 0..0 or 1..1.
//
// |Z+1| is the complement of |~Z - 1|, so the modulo decrementer structure
// is used with the decision module fed by ~z. Bit j (j >= 1) keeps z[j]
// when some lower bit is zero (d[j-1] = 1) and is inverted otherwise; bit 0
// is inverted unless z is all ones (d[N-1] = 0), which is how the end-around
// carry of 1..1 + 1 is folded back. z = 2^N-2 gives 1..1, the all-ones zero.
// Purely combinational.
//
// From the original design: the decision module on ~z and the bit-0 MUX.
// Own choice: none.
module mod_incrementer_dz #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] z,
  output logic [N-1:0] y
);
  logic [N-1:0] d;

  lsob_dm #(.N(N)) u_dm (.a(~z), .d(d));

  always_comb begin
    y[0] = d[N-1] ? ~z[0] : z[0];
    for (int j = 1; j < N; j++) y[j] = d[j-1] ? z[j] : ~z[j];
  end
endmodule
