// Final addition of the N1 converter: y = (2^N + 1) * h + k
//                                      = 2^N * h + h + k.
//
// h is in [0, 2^N-2] and k in [0, 2^N], so y fits 2N bits. An N-bit CPA adds
// h and k[N-1:0] to give the low half y[N-1:0]. The high half is h, or h + 1
// (MUX-based incrementer) when the CPA carries out or when k = 2^N (k[N] =
// 1, low bits zero): an OR of k[N] and the CPA carry steers the MUX. h + 1
// never overflows since h <= 2^N-2. Purely combinational.
//
// From the original design: the N-bit CPA, the OR of k[N] and the carry, and
// the h / h+1 MUX. Own choice: the CPA is written as a plain '+' and left
// to synthesis.
module cpa_unit #(
  parameter int unsigned N = 22
) (
  input  logic [N-1:0]   h,
  input  logic [N:0]     k,
  output logic [2*N-1:0] y
);
  logic [N-1:0] lo, h_inc;
  logic         co, unused_cout_n;

  assign {co, lo} = {1'b0, h} + {1'b0, k[N-1:0]};

  mux_incrementer #(.N(N)) u_inc (.z(h), .y(h_inc), .cout_n(unused_cout_n));

  assign y = {(k[N] | co) ? h_inc : h, lo};
endmodule
