// Unsigned MUX-based incrementer/decrementer.
//
// inc_n_dec = 1 : y = z - 1 (mod 2^N)
// inc_n_dec = 0 : y = z + 1 (mod 2^N)
//
// A data-in MUX array hands the decision module either z (decrement: find
// the least significant one) or ~z (increment: find the least significant
// zero). The data-out MUX array is the same in both modes: bit j keeps z[j]
// when d[j-1] is one and is inverted otherwise; bit 0 is always inverted.
//
// cout_n = d[N-1] is LOW when a carry or borrow leaves the MSB: decrement of
// 0 or increment of all ones. Mode polarity and the active-low flag follow
// the original design. Purely combinational.
//
// From the original design: all of the structure. Own choice: none.
module mux_incdec #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] z,
  input  logic         inc_n_dec,
  output logic [N-1:0] y,
  output logic         cout_n
);
  logic [N-1:0] din, d;

  // Data-in MUX array.
  assign din = inc_n_dec ? z : ~z;

  lsob_dm #(.N(N)) u_dm (.a(din), .d(d));

  // Data-out MUX array.
  always_comb begin
    y[0] = ~z[0];
    for (int j = 1; j < N; j++) y[j] = d[j-1] ? z[j] : ~z[j];
  end

  assign cout_n = d[N-1];
endmodule
