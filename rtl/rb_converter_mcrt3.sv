// Residue-to-binary converter for a three-moduli set {P1, 2^N, P3} by the
// modulo-reduced modified CRT. SET picks one of six moduli sets:
//   SET  P1            P2    P3
//    1   2^N+1         2^N   2^N-1
//    2   2^(2N)+1      2^N   2^N+1
//    3   2^N-1         2^N   2^(N-1)-1      (needs N >= 3)
//    4   2^(2N)+1      2^N   2^N-1
//    5   2^(2N)+1      2^N   2^(2N)-1
//    6   2^(N+1)+1     2^N   2^(N+1)-1
// Inputs are the residues x1 = X mod P1, x2 = X mod 2^N, x3 = X mod P3;
// the output is X in [0, P1*2^N*P3).
//
// How: the modified CRT gives X = x1 + P1*|K| mod (2^N*P3) with
// K = C1*x1 + C2*x2 + C3*x3 (constants per set, below). Because one factor
// of the modulus is a power of two, the large reduction splits into
//   |K| mod 2^N*P3 = 2^N * (|K >> N| mod P3)  concatenated with  K[N-1:0]
// so the low N bits of K pass straight through and only the upper part of
// K is reduced, by the small modulus P3 = 2^M3 -/+ 1. That reduction is a
// chain of M3-bit adders over the M3-bit slices of K >> N: for 2^M3-1 the
// slices are summed with end-around carry (2^M3 = 1), for 2^M3+1 they are
// added and subtracted alternately (2^M3 = -1) with a correction after each
// step. Finally X = x1 + (Y << A1) +/- Y with Y the concatenation above.
//
// Interface and timing: purely combinational, no clock. Port widths follow
// from SET and N: x1 is W1 bits, x2 is N bits, x3 is W3 bits and x is
// W1+N+W3 bits (enough for P1*2^N*P3 - 1; the top bits are zero for every
// valid residue triple). Residues outside their modulus give an undefined
// but harmless result.
//
// From the original method: the six moduli sets, the constants C1..C3 and the
// split of the reduction. This design's own choices: the structure of the
// K sum (constant multiplications), the slice-folding modulo P3 reduction
// and the output multiply-add, since the method is given only as
// arithmetic for these sets and no circuit.
module rb_converter_mcrt3 #(
  parameter int unsigned SET = 1,
  parameter int unsigned N   = 3,
  // derived sizes, not meant to be overridden
  localparam int unsigned A1  = (SET == 2 || SET == 4 || SET == 5) ? 2*N :
                                (SET == 6) ? N + 1 : N,          // P1 = 2^A1 +/- 1
  localparam bit          P1P = (SET != 3),                      // P1 = 2^A1 + 1
  localparam int unsigned M3  = (SET == 3) ? N - 1 : (SET == 5) ? 2*N :
                                (SET == 6) ? N + 1 : N,          // P3 = 2^M3 +/- 1
  localparam bit          P3P = (SET == 2),                      // P3 = 2^M3 + 1
  localparam int unsigned W1  = P1P ? A1 + 1 : A1,
  localparam int unsigned W3  = P3P ? M3 + 1 : M3,
  localparam int unsigned XW  = W1 + N + W3
) (
  input  logic [W1-1:0] x1,
  input  logic [N-1:0]  x2,
  input  logic [W3-1:0] x3,
  output logic [XW-1:0] x
);
  localparam int unsigned KW = 4*N + 3;          // K < 3 * 2^(4N)
  localparam int unsigned QW = KW - N;           // width of K >> N
  localparam int unsigned NC = (QW + M3 - 1) / M3;  // slices of K >> N

  localparam logic [KW-1:0] ONE = KW'(1);
  localparam logic [KW-1:0] C1 =
      (SET == 3) ? (ONE << (2*N-1)) - (ONE << (N+1)) + ONE :
      (SET == 6) ? (ONE << N) - ONE :
                   (ONE << (2*N-1)) - ONE;
  localparam logic [KW-1:0] C2 =
      (SET == 2) ? (ONE << N) + ONE :
      (SET == 3) ? (ONE << (2*N-2)) - ONE :
      (SET == 5) ? ((ONE << N) - ONE) * ((ONE << (2*N)) - ONE) :
      (SET == 6) ? ((ONE << N) - ONE) * ((ONE << (N+1)) - ONE) :
                   ((ONE << N) - ONE) * ((ONE << N) - ONE);
  localparam logic [KW-1:0] C3 =
      (SET == 3) ? (ONE << (2*N-2)) :
      (SET == 6) ? (ONE << N) :
                   (ONE << (2*N-1));
  localparam logic [M3:0] P3V = P3P ? ((M3+1)'(1) << M3) + (M3+1)'(1)
                                    : ((M3+1)'(1) << M3) - (M3+1)'(1);

  logic [KW-1:0]      k;
  logic [NC*M3-1:0]   q;       // K >> N, zero-extended to whole slices
  logic [M3:0]        acc [NC+1];
  logic [W3-1:0]      r;       // |K >> N| mod P3
  logic [W3+N-1:0]    yv;      // |K| mod 2^N*P3

  assign k = C1 * KW'(x1) + C2 * KW'(x2) + C3 * KW'(x3);
  assign q = (NC*M3)'(k[KW-1:N]);

  assign acc[0] = '0;
  for (genvar i = 0; i < NC; i++) begin : g_fold
    logic [M3-1:0] sl;
    logic [M3+1:0] s;
    assign sl = q[i*M3 +: M3];
    if (!P3P) begin : g_eac
      // modulo 2^M3-1: add the slice, fold the carry back in
      assign s      = {2'b0, acc[i][M3-1:0]} + {2'b0, sl};
      assign acc[i+1] = {1'b0, s[M3-1:0] + M3'(s[M3])};
    end else if (i % 2 == 0) begin : g_add
      // modulo 2^M3+1, even slice weight +1: add, subtract P3 on overflow
      assign s      = {1'b0, acc[i]} + {2'b0, sl};
      assign acc[i+1] = (s >= {1'b0, P3V}) ? (M3+1)'(s - {1'b0, P3V}) : s[M3:0];
    end else begin : g_sub
      // modulo 2^M3+1, odd slice weight -1: subtract, add P3 on borrow
      assign s      = {1'b0, acc[i]} - {2'b0, sl};
      assign acc[i+1] = s[M3+1] ? (M3+1)'(s + {1'b0, P3V}) : s[M3:0];
    end
  end

  if (!P3P) begin : g_rm
    // the end-around-carry sum leaves 2^M3-1 as a second code for zero
    assign r = (acc[NC][M3-1:0] == P3V[M3-1:0]) ? '0 : acc[NC][M3-1:0];
  end else begin : g_rp
    assign r = acc[NC];
  end

  assign yv = {r, k[N-1:0]};
  if (P1P) begin : g_p1p
    assign x = XW'(x1) + (XW'(yv) << A1) + XW'(yv);
  end else begin : g_p1m
    assign x = XW'(x1) + (XW'(yv) << A1) - XW'(yv);
  end
endmodule
