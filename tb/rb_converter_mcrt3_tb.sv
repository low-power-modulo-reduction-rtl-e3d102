// Testbench for rb_converter_mcrt3. One instance per moduli set at the
// 8-bit-range example sizes ({9,8,7}, {17,4,5}, {15,16,7}, {65,8,7},
// {17,4,15}, {17,8,15}) and one per set at a larger N (every set at N = 5,
// and N = 4 for the set with the widest words), plus two wide instances
// (set 5 at N = 10, set 2 at N = 12) that get the low end of their range
// and random values. X runs from 0 to 199,999 (each instance reduces it
// modulo its own range, so the small ranges are covered completely and
// repeatedly), then 20,000 random X per instance; every X is turned into
// residues and must convert back. The worked examples
// (X = 169 in {9,8,7}, X = 38 in the other five) are checked by name.
// All instances are driven in one loop by the same X, reduced per instance.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module rb_converter_mcrt3_tb;
  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NI = 14;
  localparam int SETS [NI] = '{1, 2, 3, 4, 5, 6, 1, 2, 3, 4, 5, 6, 5, 2};
  localparam int NS   [NI] = '{3, 2, 4, 3, 2, 3, 5, 5, 5, 5, 4, 5, 10, 12};

  function automatic longint p1(int s, int n);
    case (s)
      1: return (64'd1 << n) + 1;
      3: return (64'd1 << n) - 1;
      6: return (64'd1 << (n + 1)) + 1;
      default: return (64'd1 << (2 * n)) + 1;
    endcase
  endfunction
  function automatic longint p3(int s, int n);
    case (s)
      2: return (64'd1 << n) + 1;
      3: return (64'd1 << (n - 1)) - 1;
      5: return (64'd1 << (2 * n)) - 1;
      6: return (64'd1 << (n + 1)) - 1;
      default: return (64'd1 << n) - 1;
    endcase
  endfunction

  longint xin [NI];
  longint xout [NI];

  for (genvar g = 0; g < NI; g++) begin : g_dut
    localparam int unsigned S = SETS[g];
    localparam int unsigned NN = NS[g];
    localparam longint P1 = (S == 1) ? (64'd1 << NN) + 1 : (S == 3) ? (64'd1 << NN) - 1 :
                            (S == 6) ? (64'd1 << (NN + 1)) + 1 : (64'd1 << (2 * NN)) + 1;
    localparam longint P3 = (S == 2) ? (64'd1 << NN) + 1 : (S == 3) ? (64'd1 << (NN - 1)) - 1 :
                            (S == 5) ? (64'd1 << (2 * NN)) - 1 :
                            (S == 6) ? (64'd1 << (NN + 1)) - 1 : (64'd1 << NN) - 1;
    localparam int unsigned W1 = (S == 3) ? NN : (S == 1) ? NN + 1 : (S == 6) ? NN + 2 : 2 * NN + 1;
    localparam int unsigned W3 = (S == 2) ? NN + 1 : (S == 3) ? NN - 1 : (S == 5) ? 2 * NN :
                                 (S == 6) ? NN + 1 : NN;
    logic [W1+NN+W3-1:0] dut_x;
    rb_converter_mcrt3 #(.SET(S), .N(NN)) dut (
      .x1(W1'(xin[g] % P1)),
      .x2(NN'(xin[g] % (64'd1 << NN))),
      .x3(W3'(xin[g] % P3)),
      .x(dut_x));
    assign xout[g] = longint'(dut_x);
  end

  initial begin
    longint m [NI];
    longint maxm;
    maxm = 0;
    for (int i = 0; i < NI; i++) begin
      m[i] = p1(SETS[i], NS[i]) * (64'd1 << NS[i]) * p3(SETS[i], NS[i]);
      if (m[i] > maxm) maxm = m[i];
    end
    // worked examples
    xin[0] = 169;
    for (int i = 1; i < 6; i++) xin[i] = 38;
    for (int i = 6; i < NI; i++) xin[i] = 0;
    #1;
    check(xout[0] == 169, "example X=169 in {9,8,7}");
    for (int i = 1; i < 6; i++) check(xout[i] == 38, $sformatf("example X=38, set %0d", SETS[i]));
    // whole dynamic range of each instance (largest first runs out of range
    // for the smaller ones, which then wrap around again)
    for (longint v = 0; v < maxm && v < 200000; v++) begin
      for (int i = 0; i < NI; i++) xin[i] = v % m[i];
      #1;
      for (int i = 0; i < NI; i++)
        check(xout[i] == xin[i], $sformatf("set %0d n=%0d X=%0d got %0d", SETS[i], NS[i], xin[i], xout[i]));
    end
    // random values in the ranges too large to cover
    for (int t = 0; t < 20000; t++) begin
      for (int i = 0; i < NI; i++) xin[i] = longint'({$urandom, $urandom} >> 1) % m[i];
      #1;
      for (int i = 0; i < NI; i++)
        check(xout[i] == xin[i], $sformatf("set %0d n=%0d X=%0d got %0d", SETS[i], NS[i], xin[i], xout[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
