// Two's complement MUX-based incrementer/decrementer.
//
// inc_n_dec = 1 : y = z - 1,  inc_n_dec = 0 : y = z + 1 (both wrap).
//
// The bit pattern of a two's complement increment/decrement is identical to
// the unsigned one, so the datapath is the unsigned MUX-based unit: data-in
// MUX array (z or ~z), decision module, data-out MUX array. Only the flag
// differs. The decision module here spans bits 0..N-2, and the overflow flag
//
//   ovf_n = d[N-2] | (inc_n_dec ^ z[N-1])
//
// is LOW exactly when decrementing the most negative value (10..0) or
// incrementing the most positive one (01..1). The flag is active low, as in
// the original design. N must be at least 2. Purely combinational.
//
// From the original design: the shared datapath and the flag equation. Own
// choice: none.
module mux_incdec_signed #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] z,
  input  logic         inc_n_dec,
  output logic [N-1:0] y,
  output logic         ovf_n
);
  logic [N-2:0] din, d;

  assign din = inc_n_dec ? z[N-2:0] : ~z[N-2:0];

  lsob_dm #(.N(N-1)) u_dm (.a(din), .d(d));

  always_comb begin
    y[0] = ~z[0];
    for (int j = 1; j < N; j++) y[j] = d[j-1] ? z[j] : ~z[j];
  end

  assign ovf_n = d[N-2] | (inc_n_dec ^ z[N-1]);
endmodule
