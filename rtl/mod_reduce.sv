// Modulo reduction of a KW-bit unsigned K by a product of NM small moduli
// P[0]*P[1]*...*P[NM-1], split into NM small reductions that run in parallel:
//   |K| mod (P0*P1*...*P(NM-1)) =
//       sum over m = 1..NM-1 of  (|floor(K / (P0*...*P(m-1)))| mod Pm) * (P0*...*P(m-1))
//     + |K| mod P0
// Each term m uses only a small modulus Pm (the "digit" of the result in the
// mixed radix P0, P1, ...), so one large modulo operation becomes NM small
// ones plus a weighted sum. Where a prefix product is a power of two, the
// floor division is only a bit selection and the weighted sum of the low
// digit is a concatenation; the synthesis tool does that simplification on
// its own from the constant operands.
//
// Interface and timing: purely combinational, no clock. k is KW bits, r is
// RW = clog2(P0*...*P(NM-1)) bits and always lies in [0, P0*...*P(NM-1)).
// Moduli are positive integers (any value >= 1); their product and every
// intermediate product must stay below 2^63.
//
// From the original method: the decomposition above, including its default
// example (K = 1099, moduli 2, 3, 4, 5, so r = 19) which sets the default
// sizes. This design's own choices: the widths, computing each digit with a
// plain constant division and modulo (the method gives the arithmetic, not a
// circuit for the small modulo operations), and the final weighted sum done
// as one adder tree.
module mod_reduce #(
  parameter int unsigned NM     = 4,
  parameter int unsigned P [NM] = '{2, 3, 4, 5},
  parameter int unsigned KW     = 11,
  // derived size, not meant to be overridden
  localparam int unsigned RW    = $clog2(prod(NM))
) (
  input  logic [KW-1:0] k,
  output logic [RW-1:0] r
);
  // product of the first m moduli (1 for m = 0)
  function automatic longint unsigned prod(int unsigned m);
    longint unsigned v = 1;
    for (int unsigned i = 0; i < m; i++) v = v * P[i];
    return v;
  endfunction

  localparam int unsigned SW = (RW > 1) ? RW : 1;

  logic [SW-1:0] term [NM];

  for (genvar m = 0; m < NM; m++) begin : g_digit
    localparam longint unsigned PP = prod(m);      // weight of digit m
    localparam longint unsigned PM = 64'(P[m]);
    localparam int unsigned     TW = $clog2(PM) + 1;
    logic [TW-1:0] d;                                // |floor(K / PP)| mod Pm
    if (KW < 63 && PP >= (64'd1 << KW)) begin : g_zero
      // K / PP is always zero: the digit is zero
      assign d = '0;
    end else begin : g_div
      logic [KW-1:0] q;
      assign q = k / KW'(PP);
      assign d = TW'(q % KW'(PM));
    end
    assign term[m] = SW'(64'(d) * PP);
  end

  always_comb begin
    logic [SW-1:0] s;
    s = '0;
    for (int m = 0; m < NM; m++) s = s + term[m];
    r = RW'(s);
  end
endmodule
