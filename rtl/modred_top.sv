// Top level: the modulo-reduced residue-to-binary converter for
// {2^N, 2^N+1, 2^N-1}, with the MUX-based arithmetic units that the
// converter does not itself need standing beside it, each with its own
// ports:
//   - converter:   x1, x2, x3 -> x (see rb_converter_n1)
//   - mux_incdec:  unsigned incrementer/decrementer, W bits
//   - mux_incdec_signed: two's complement incrementer/decrementer, W bits
//   - mod_incrementer:   modulo 2^W-1 incrementer, single zero, W bits
//   - rb_converter_mcrt3: the general three-moduli converter {P1, 2^MN, P3}
//     for moduli set MSET (1..6), a1, a2, a3 -> a
//   - rb_converter_mcrt: the converter for any GNM pairwise coprime moduli
//     GP (default {9, 8, 7, 5}), residues g -> gx
//   - mod_reduce: K mod (RP[0]*...*RP[RNM-1]) by parallel small reductions
//     (default moduli 2, 3, 4, 5 and an RKW = 11 bit K), rk -> rr
// The binary incrementer and the modulo 2^N-1 decrementer (with the binary
// decrementer inside it) are reached through the converter. The double-zero
// modulo incrementer is reached through mod_incrementer.
// Everything is combinational; there is no clock or reset.
//
// From the original design: each unit. Own choice: putting the units side
// by side in one top with separate ports, and the default sizes (N = 22,
// W = 32, the {9,8,7} instance for the three-moduli converter, the
// {9,8,7,5} and 2*3*4*5 instances of the last two units, all taken from the
// worked examples of the original method). x[N-1:0] is x1
// wired straight through, as in the converter.
module modred_top #(
  parameter int unsigned N = 22,   // converter: dynamic range 3N bits
  parameter int unsigned W = 32,   // standalone incrementer/decrementer width
  parameter int unsigned MSET = 1, // moduli set of the general converter
  parameter int unsigned MN = 3,   // its n
  parameter int unsigned GNM = 4,                    // n-moduli converter: number of moduli
  parameter int unsigned GP [GNM] = '{9, 8, 7, 5},   // its moduli, first one P1
  parameter int unsigned RNM = 4,                    // modulo reduction: number of moduli
  parameter int unsigned RP [RNM] = '{2, 3, 4, 5},   // its moduli
  parameter int unsigned RKW = 11,                   // its operand width
  // port widths of the general converter, derived, not meant to be overridden
  localparam int unsigned MW1 = (MSET == 3) ? MN : (MSET == 1) ? MN + 1 :
                                (MSET == 6) ? MN + 2 : 2*MN + 1,
  localparam int unsigned MW3 = (MSET == 2) ? MN + 1 : (MSET == 3) ? MN - 1 :
                                (MSET == 5) ? 2*MN : (MSET == 6) ? MN + 1 : MN,
  localparam int unsigned GRW = $clog2(gmax()),      // residue width, n-moduli converter
  localparam int unsigned GXW = $clog2(gprod()),     // its output width
  localparam int unsigned RRW = $clog2(rprod())      // modulo reduction result width
) (
  input  logic [N-1:0]   x1,
  input  logic [N:0]     x2,
  input  logic [N-1:0]   x3,
  output logic [3*N-1:0] x,

  input  logic [W-1:0]   z,
  input  logic           inc_n_dec,
  output logic [W-1:0]   y,
  output logic           cout_n,

  input  logic [W-1:0]   zs,
  input  logic           inc_n_dec_s,
  output logic [W-1:0]   ys,
  output logic           ovf_n,

  input  logic [W-1:0]   zm,
  output logic [W-1:0]   ym,

  input  logic [MW1-1:0] a1,
  input  logic [MN-1:0]  a2,
  input  logic [MW3-1:0] a3,
  output logic [MW1+MN+MW3-1:0] a,

  input  logic [GNM-1:0][GRW-1:0] g,
  output logic [GXW-1:0] gx,

  input  logic [RKW-1:0] rk,
  output logic [RRW-1:0] rr
);
  function automatic longint unsigned gmax();
    longint unsigned v = 2;
    for (int unsigned i = 0; i < GNM; i++) if (64'(GP[i]) > v) v = 64'(GP[i]);
    return v;
  endfunction

  function automatic longint unsigned gprod();
    longint unsigned v = 1;
    for (int unsigned i = 0; i < GNM; i++) v = v * GP[i];
    return v;
  endfunction

  function automatic longint unsigned rprod();
    longint unsigned v = 1;
    for (int unsigned i = 0; i < RNM; i++) v = v * RP[i];
    return v;
  endfunction

  rb_converter_n1   #(.N(N)) u_conv   (.x1(x1), .x2(x2), .x3(x3), .x(x));
  mux_incdec        #(.N(W)) u_incdec (.z(z), .inc_n_dec(inc_n_dec), .y(y), .cout_n(cout_n));
  mux_incdec_signed #(.N(W)) u_sincdec(.z(zs), .inc_n_dec(inc_n_dec_s), .y(ys), .ovf_n(ovf_n));
  mod_incrementer   #(.N(W)) u_modinc (.z(zm), .y(ym));
  rb_converter_mcrt3 #(.SET(MSET), .N(MN)) u_mcrt (.x1(a1), .x2(a2), .x3(a3), .x(a));
  rb_converter_mcrt  #(.NM(GNM), .P(GP)) u_gconv (.xr(g), .x(gx));
  mod_reduce         #(.NM(RNM), .P(RP), .KW(RKW)) u_red (.k(rk), .r(rr));
endmodule
