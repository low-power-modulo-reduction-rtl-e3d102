// End-to-end testbench for modred_top at reduced size (N = 4, W = 6, and
// the general converter for moduli set 2 with n = 3, {65, 8, 9}): every X
// of either converter's dynamic range goes in as its residue triple and
// must come back unchanged; every operand of the three
// side units is applied in all mode combinations. Each mechanism of the design is
// counted and must occur at least once:
//   conv_ge      x1 >= x2, h taken straight from the 1's complement adder
//   conv_lt      x1 <  x2, h from the modulo 2^N-1 decrementer
//   conv_dec0    the decrementer wraps (its input is zero)
//   conv_x2top   x2 = 2^N, k = x1 + 1 and the constant 2^(N-1)-1 operand
//   conv_kn      k = 2^N (top bit of k set), high half incremented
//   conv_carry   final CPA carries out, high half incremented
//   cout_inc / cout_dec   unsigned unit carries / borrows out
//   ovf_inc / ovf_dec     signed unit overflows
//   modinc_wrap  modulo incrementer turns 2^W-2 into 0
//   mc_fold      general converter: a slice step of its modulo-P3
//                reduction needs its carry or correction
//   gc_wrap      n-moduli converter ({5, 4, 3} here): the weighted sum K
//                reaches P2*...*Pn, so the parallel reduction removes a
//                multiple of it
//   mr_wrap      modulo reduction (moduli 3, 4, 5, 8-bit K): K >= 60
// Timing: the design is combinational; each input set is held for one time
// unit before the outputs are compared.
module modred_top_tb;
  localparam int unsigned N = 4;
  localparam int unsigned W = 6;
  localparam int P  = 1 << N;
  localparam int MR = P * (P * P - 1);   // dynamic range

  int checks = 0, failures = 0;

  logic [N-1:0]   x1, x3;
  logic [N:0]     x2;
  logic [3*N-1:0] x;
  logic [W-1:0]   z, y, zs, ys, zm, ym;
  logic           inc_n_dec, cout_n, inc_n_dec_s, ovf_n;
  // general three-moduli converter, moduli set 2 with n = 3: {65, 8, 9}
  localparam int MSET = 2, MN = 3, MP1 = 65, MP3 = 9, MM3 = 3;
  localparam int MC1 = 31, MC2 = 9, MC3 = 32;   // K = MC1 a1 + MC2 a2 + MC3 a3
  logic [6:0] a1;
  logic [MN-1:0] a2;
  logic [3:0] a3;
  logic [13:0] a;

  // n-moduli converter {5, 4, 3}: weights 7, 3, 4, inverses 3, 3, 2
  localparam int unsigned GPL [3] = '{5, 4, 3};
  logic [2:0][2:0] g;
  logic [5:0] gx;
  // modulo reduction by 3 * 4 * 5 of an 8-bit K
  localparam int unsigned RPL [3] = '{3, 4, 5};
  logic [7:0] rk;
  logic [5:0] rr;

  modred_top #(.N(N), .W(W), .MSET(MSET), .MN(MN), .GNM(3), .GP(GPL),
               .RNM(3), .RP(RPL), .RKW(8)) dut (.*);

  int conv_ge = 0, conv_lt = 0, conv_dec0 = 0, conv_x2top = 0, conv_kn = 0, conv_carry = 0;
  int cout_inc = 0, cout_dec = 0, ovf_inc = 0, ovf_dec = 0, modinc_wrap = 0;
  int mc_fold = 0, mc_zero = 0, gc_wrap = 0, mr_wrap = 0;

  // Follows the modulo-P3 slice reduction of K >> MN independently and
  // reports whether a slice step needed its carry / correction (fold) and
  // whether the result hit the second code of zero (zero).
  task automatic mcrt_case(input int v, output bit fold, output bit zero);
    int k, q, acc, sl, i;
    k = MC1 * (v % MP1) + MC2 * (v % (1 << MN)) + MC3 * (v % MP3);
    q = k >> MN; acc = 0; fold = 0; zero = 0; i = 0;
    while (q != 0) begin
      sl = q % (1 << MM3); q = q >> MM3;
      if (MP3 == (1 << MM3) - 1) begin
        acc = acc + sl;
        if (acc >= (1 << MM3)) begin fold = 1; acc = acc - (1 << MM3) + 1; end
      end else if (i % 2 == 0) begin
        acc = acc + sl;
        if (acc >= MP3) begin fold = 1; acc = acc - MP3; end
      end else begin
        acc = acc - sl;
        if (acc < 0) begin fold = 1; acc = acc + MP3; end
      end
      i++;
    end
    zero = (MP3 == (1 << MM3) - 1) && (acc == MP3);
  endtask

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    z = '0; zs = '0; zm = '0; a1 = '0; a2 = '0; a3 = '0; inc_n_dec = 1'b0; inc_n_dec_s = 1'b0;
    g = '0; rk = '0;
    // Converter, whole dynamic range
    for (int v = 0; v < MR; v++) begin
      int av, b, e, yv, k, h;
      av = v % P; b = v % (P + 1); e = v % (P - 1);
      x1 = N'(av); x2 = (N+1)'(b); x3 = N'(e); #1;
      check(int'(x) == v, $sformatf("X=%0d (%0d,%0d,%0d) got %0d", v, av, b, e, x));
      // Classify by the independent decomposition Y = (2^N+1) h + k
      yv = v / P;
      k  = (b == P) ? av + 1 : (((av - b) % (P + 1)) + (P + 1)) % (P + 1);
      h  = (yv - k) / (P + 1);
      if (b == P)      conv_x2top++;
      else if (av >= b) conv_ge++;
      else begin
        conv_lt++;
        if (h == P - 2) conv_dec0++;
      end
      if (k == P) conv_kn++;
      else if (h + k >= P) conv_carry++;
    end
    // General three-moduli converter, whole dynamic range
    for (int v = 0; v < MP1 * (1 << MN) * MP3; v++) begin
      bit f, zz;
      a1 = $bits(a1)'(v % MP1); a2 = MN'(v % (1 << MN)); a3 = $bits(a3)'(v % MP3); #1;
      check(int'(a) == v, $sformatf("mcrt X=%0d got %0d", v, a));
      mcrt_case(v, f, zz);
      if (f) mc_fold++;
      if (zz) mc_zero++;
    end
    // n-moduli converter, whole dynamic range
    for (int v = 0; v < 60; v++) begin
      int kk;
      g = {3'(v % 3), 3'(v % 4), 3'(v % 5)}; #1;
      check(int'(gx) == v, $sformatf("n-moduli X=%0d got %0d", v, gx));
      kk = 7 * (v % 5) + 3 * ((3 * (v % 4)) % 4) + 4 * ((2 * (v % 3)) % 3);
      if (kk >= 12) gc_wrap++;
    end
    // Modulo reduction, every K
    for (int v = 0; v < 256; v++) begin
      rk = 8'(v); #1;
      check(int'(rr) == v % 60, $sformatf("mod_reduce K=%0d got %0d", v, rr));
      if (v >= 60) mr_wrap++;
    end
    // Side units, every operand in both modes
    // The two units get independent modes, all four combinations.
    for (int mm = 0; mm < 4; mm++)
      for (int i = 0; i < (1 << W); i++) begin
        int r;
        logic m, ms;
        m = mm[0]; ms = mm[1];
        z = W'(i); zs = W'(i); zm = W'(i); inc_n_dec = m; inc_n_dec_s = ms; #1;
        check(y == (m ? W'(i - 1) : W'(i + 1)), $sformatf("incdec z=%0d m=%0d", i, m));
        check(cout_n == (m ? (i != 0) : (i != (1 << W) - 1)), "incdec cout_n");
        if (!cout_n) begin if (m) cout_dec++; else cout_inc++; end
        r = int'($signed(zs)) + (ms ? -1 : 1);
        check(ys == W'(r), $sformatf("signed z=%0d m=%0d", i, ms));
        check(ovf_n == (r >= -(1 << (W - 1)) && r < (1 << (W - 1))), "signed ovf_n");
        if (!ovf_n) begin if (ms) ovf_dec++; else ovf_inc++; end
        check(int'(ym) == ((i % ((1 << W) - 1)) + 1) % ((1 << W) - 1), $sformatf("modinc z=%0d", i));
        if (i == (1 << W) - 2 && ym == '0) modinc_wrap++;
      end
    $display("mechanisms: ge=%0d lt=%0d dec0=%0d x2top=%0d kn=%0d carry=%0d cout_inc=%0d cout_dec=%0d ovf_inc=%0d ovf_dec=%0d modinc_wrap=%0d mc_fold=%0d mc_zero=%0d gc_wrap=%0d mr_wrap=%0d",
             conv_ge, conv_lt, conv_dec0, conv_x2top, conv_kn, conv_carry, cout_inc, cout_dec, ovf_inc, ovf_dec, modinc_wrap, mc_fold, mc_zero,
             gc_wrap, mr_wrap);
    check(conv_ge > 0, "mechanism x1>=x2 never occurred");
    check(conv_lt > 0, "mechanism x1<x2 never occurred");
    check(conv_dec0 > 0, "mechanism decrement wrap never occurred");
    check(conv_x2top > 0, "mechanism x2=2^N never occurred");
    check(conv_kn > 0, "mechanism k=2^N never occurred");
    check(conv_carry > 0, "mechanism CPA carry never occurred");
    check(cout_inc > 0 && cout_dec > 0, "unsigned carry/borrow never occurred");
    check(ovf_inc > 0 && ovf_dec > 0, "signed overflow never occurred");
    check(modinc_wrap > 0, "modulo increment wrap never occurred");
    check(mc_fold > 0, "general converter slice carry/correction never occurred");
    if (MP3 == (1 << MM3) - 1) check(mc_zero > 0, "general converter second zero code never occurred");
    check(gc_wrap > 0, "n-moduli converter reduction never removed a multiple");
    check(mr_wrap > 0, "modulo reduction never removed a multiple");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
