// Residue-to-binary converter for a general set of NM pairwise coprime
// moduli {P1, P2, ..., Pn} by the modulo-reduced modified CRT:
//   X = x1 + P1 * |K| mod (P2*P3*...*Pn),   K = sum over i of w_i * x'_i
// with, for M = P1*...*Pn and N_i = M / P_i,
//   w_1 = (N_1 * |N_1^-1| mod P1 - 1) / P1,   x'_1 = x1,
//   w_i = N_i / P1,                           x'_i = |N_i^-1 * x_i| mod P_i.
// The one large reduction modulo P2*...*Pn is replaced by the parallel
// small reductions of mod_reduce (moduli P2, ..., Pn), so the result is
//   X = x1 + P1 * ( sum over m of P2*...*P(m+1) * |floor(K/(P2*...*P(m+1)))| mod P(m+2)
//                   + |K| mod P2 ).
// When P2 is a power of two the |K| mod P2 term is the low bits of K and the
// next floor division is a shift.
//
// Interface and timing: purely combinational, no clock. xr[i] is the residue
// of X modulo P[i] (xr[0] belongs to P1), each RW = clog2(max P) bits wide;
// x is X in [0, M), XW = clog2(M) bits. Residues outside their modulus give
// an undefined but harmless result. All constants (N_i, inverses, weights)
// are worked out at elaboration from the parameter P; M must stay below 2^40
// or so to keep K and the products within 64 bits.
//
// From the original method: the conversion formula, the weights and the
// default moduli set {9, 8, 7, 5} of its four-moduli example (residues
// (7, 4, 3, 2) give X = 52). This design's own choices: each inverse is
// taken as the smallest positive one (for P1 = 9 that is 1, so w_1 = 31,
// where the example uses the equivalent 10 and w_1 = 311), the constant
// multiply-and-reduce for each x'_i (the formula reduces x'_i modulo P_i,
// while the worked example sums the unreduced products, K = 3645 there;
// the formula is followed here, K = 565 for the example), the K sum as one adder tree, and the
// final multiply-add by P1; the method gives the arithmetic, not a circuit.
module rb_converter_mcrt #(
  parameter int unsigned NM     = 4,
  parameter int unsigned P [NM] = '{9, 8, 7, 5},
  // derived sizes, not meant to be overridden
  localparam int unsigned RW    = $clog2(maxp()),
  localparam int unsigned XW    = $clog2(prod(0, NM))
) (
  input  logic [NM-1:0][RW-1:0] xr,
  output logic [XW-1:0]         x
);
  // product P[lo] * ... * P[hi-1]
  function automatic longint unsigned prod(int unsigned lo, int unsigned hi);
    longint unsigned v = 1;
    for (int unsigned i = lo; i < hi; i++) v = v * P[i];
    return v;
  endfunction

  function automatic longint unsigned maxp();
    longint unsigned v = 2;
    for (int unsigned i = 0; i < NM; i++) if (64'(P[i]) > v) v = 64'(P[i]);
    return v;
  endfunction

  // modulus i as a 64-bit value
  function automatic longint unsigned pv(int unsigned i);
    longint unsigned v = 1;
    for (int unsigned j = 0; j < NM; j++) if (j == i) v = 64'(P[j]);
    return v;
  endfunction

  // smallest positive inverse of (M / P[i]) modulo P[i]
  function automatic longint unsigned inv(int unsigned i);
    longint unsigned nr = (prod(0, NM) / pv(i)) % pv(i);
    for (longint unsigned v = 1; v < pv(i); v++)
      if ((nr * v) % pv(i) == 1) return v;
    return 1;                               // P[i] = 1, or not coprime
  endfunction

  function automatic longint unsigned weight(int unsigned i);
    longint unsigned ni = prod(0, NM) / pv(i);
    if (i == 0) return (ni * inv(0) - 1) / pv(0);
    return ni / pv(0);
  endfunction

  function automatic longint unsigned kmax();
    longint unsigned v = 0;
    for (int unsigned i = 0; i < NM; i++) v = v + weight(i) * (pv(i) - 1);
    return v;
  endfunction

  localparam int unsigned KW = $clog2(kmax() + 1);
  localparam int unsigned RM = $clog2(prod(1, NM));     // width of |K| mod P2...Pn
  localparam int unsigned PR [NM-1] = P[1:NM-1];

  logic [KW-1:0] term [NM];
  logic [KW-1:0] k;
  logic [RM-1:0] kr;

  for (genvar i = 0; i < NM; i++) begin : g_term
    localparam longint unsigned W  = weight(i);
    localparam longint unsigned IV = inv(i);
    localparam longint unsigned PI = 64'(P[i]);
    logic [RW-1:0] xp;                                  // x'_i
    if (i == 0) begin : g_first
      assign xp = xr[i];
    end else begin : g_rest
      assign xp = RW'((64'(xr[i]) * IV) % PI);
    end
    assign term[i] = KW'(64'(xp) * W);
  end

  always_comb begin
    logic [KW-1:0] s;
    s = '0;
    for (int i = 0; i < NM; i++) s = s + term[i];
    k = s;
  end

  mod_reduce #(.NM(NM - 1), .P(PR), .KW(KW)) u_red (.k(k), .r(kr));

  assign x = XW'(xr[0]) + XW'(64'(kr) * P[0]);
endmodule
