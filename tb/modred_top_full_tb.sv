// Full-size testbench for modred_top with its default parameters (converter
// N = 22, dynamic range 2^22 (2^44 - 1), about 2^66; side units W = 32).
// Random X values plus chosen ones (0, the largest X, and values that drive
// each converter case) are turned into residues and must convert back; the
// side units get random and corner operands in all mode combinations, and
// the general converter (default {9, 8, 7}) every X of its range. Every
// mechanism listed in modred_top_tb is counted here as well and must occur,
// plus mc_zero: the end-around-carry reduction ends on its all-ones code of
// zero and is corrected to 0. The n-moduli converter ({9, 8, 7, 5}) gets
// every X of its range and the modulo reduction (2*3*4*5, 11-bit K) every
// K; both worked examples ((7, 4, 3, 2) -> 52 and |1099| mod 120 = 19) are
// checked by name.
// Timing: the design is combinational; each input set is held for one time
// unit before the outputs are compared.
module modred_top_full_tb;
  localparam int unsigned N = 22;
  localparam int unsigned W = 32;

  int checks = 0, failures = 0;

  logic [N-1:0]   x1, x3;
  logic [N:0]     x2;
  logic [3*N-1:0] x;
  logic [W-1:0]   z, y, zs, ys, zm, ym;
  logic           inc_n_dec, cout_n, inc_n_dec_s, ovf_n;
  // general three-moduli converter, moduli set 1 with n = 3: {9, 8, 7}
  localparam int MN = 3, MP1 = 9, MP3 = 7, MM3 = 3;
  localparam int MC1 = 31, MC2 = 49, MC3 = 32;   // K = MC1 a1 + MC2 a2 + MC3 a3
  logic [3:0] a1;
  logic [MN-1:0] a2;
  logic [2:0] a3;
  logic [9:0] a;

  // n-moduli converter {9, 8, 7, 5}: weights 31, 35, 40, 56, inverses 1, 3, 5, 4
  logic [3:0][3:0] g;
  logic [11:0] gx;
  // modulo reduction by 2 * 3 * 4 * 5 of an 11-bit K
  logic [10:0] rk;
  logic [6:0] rr;

  modred_top dut (.*);

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

  // Converts X and classifies it with the decomposition Y = (2^N+1) h + k.
  task automatic convert(input logic [3*N-1:0] v);
    logic [3*N-1:0] pw, yv, k, h;
    pw = (3*N)'(1) << N;
    x1 = N'(v % pw); x2 = (N+1)'(v % (pw + 1)); x3 = N'(v % (pw - 1)); #1;
    check(x == v, $sformatf("X=%h got %h", v, x));
    yv = v / pw;
    if (x2 == (N+1)'(pw)) k = (3*N)'(x1) + 1;
    else if (x1 >= x2[N-1:0]) k = (3*N)'(x1) - (3*N)'(x2);
    else k = (3*N)'(x1) + pw + 1 - (3*N)'(x2);
    h = (yv - k) / (pw + 1);
    if (x2 == (N+1)'(pw)) conv_x2top++;
    else if (x1 >= x2[N-1:0]) conv_ge++;
    else begin conv_lt++; if (h == pw - 2) conv_dec0++; end
    if (k == pw) conv_kn++;
    else if (h + k >= pw) conv_carry++;
  endtask

  initial begin
    logic [3*N-1:0] m, pw;
    pw = (3*N)'(1) << N;
    m  = pw * (pw * pw - 1);
    z = '0; zs = '0; zm = '0; a1 = '0; a2 = '0; a3 = '0; inc_n_dec = 1'b0; inc_n_dec_s = 1'b0;
    g = '0; rk = '0;
    convert('0);
    convert(m - 1);
    convert(pw * pw);                 // x2 = 2^N
    convert((pw - 2) * (pw + 1) * pw + 3);   // h = 2^N-2 region
    for (int i = 0; i < 20000; i++) convert({2'($urandom), $urandom, $urandom} % m);
    // Force the rarer cases: pick h and k, build Y = (2^N+1) h + k, X = 2^N Y + x1
    for (int i = 0; i < 2000; i++) begin
      logic [3*N-1:0] hh, kk, xa;
      hh = (i % 2 != 0) ? pw - 2 : (3*N)'($urandom % (1 << N - 1));
      kk = (i % 3 == 0) ? pw : (3*N)'($urandom % (1 << N));
      xa = (3*N)'($urandom % (1 << N));
      convert(((pw + 1) * hh + kk) * pw + xa);
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
    // n-moduli converter: the worked example, then the whole dynamic range
    g = {4'd2, 4'd3, 4'd4, 4'd7}; #1;
    check(gx == 12'd52, "example (7,4,3,2) in {9,8,7,5} -> 52");
    for (int v = 0; v < 2520; v++) begin
      int kk;
      g = {4'(v % 5), 4'(v % 7), 4'(v % 8), 4'(v % 9)}; #1;
      check(int'(gx) == v, $sformatf("n-moduli X=%0d got %0d", v, gx));
      kk = 31 * (v % 9) + 35 * ((3 * (v % 8)) % 8) + 40 * ((5 * (v % 7)) % 7) + 56 * ((4 * (v % 5)) % 5);
      if (kk >= 280) gc_wrap++;
    end
    // Modulo reduction: the worked example, then every K
    rk = 11'd1099; #1;
    check(rr == 7'd19, "example |1099| mod 120 = 19");
    for (int v = 0; v < 2048; v++) begin
      rk = 11'(v); #1;
      check(int'(rr) == v % 120, $sformatf("mod_reduce K=%0d got %0d", v, rr));
      if (v >= 120) mr_wrap++;
    end
    for (int i = 0; i < 8000; i++) begin
      logic [W-1:0] v;
      longint r;
      int c;
      c = i >> 2;   // corner operand index, each in all four mode combinations
      v = (c < 4) ? W'(c) : (c < 8) ? ~W'(c - 4) : (c < 12) ? 32'h7fff_fffe + W'(c - 8) : $urandom;
      z = v; zs = v; zm = v; inc_n_dec = i[0]; inc_n_dec_s = i[1]; #1;
      check(y == (inc_n_dec ? v - 1'b1 : v + 1'b1), $sformatf("incdec z=%h", v));
      check(cout_n == (inc_n_dec ? (v != 0) : (v != '1)), "incdec cout_n");
      if (!cout_n) begin if (inc_n_dec) cout_dec++; else cout_inc++; end
      r = longint'($signed(v)) + (inc_n_dec_s ? -1 : 1);
      check(ys == W'(r), $sformatf("signed z=%h", v));
      check(ovf_n == (r >= -64'sd2147483648 && r <= 64'sd2147483647), "signed ovf_n");
      if (!ovf_n) begin if (inc_n_dec_s) ovf_dec++; else ovf_inc++; end
      check(longint'(ym) == ((longint'(v) % 64'd4294967295) + 1) % 64'd4294967295, $sformatf("modinc z=%h", v));
      if (v == 32'hffff_fffe && ym == '0) modinc_wrap++;
    end
    zm = 32'hffff_fffe; #1;
    check(ym == '0, "modinc 2^W-2");
    if (ym == '0) modinc_wrap++;
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
