// Self-checking testbench for csa_mux_unit: all legal residue triples of a
// 3-bit instance and random triples of a 22-bit (default) instance.
// Reference: S + 2C must equal T1 + T2 + T3 (x2 < 2^N) or
// T1 + 2^(N-1)-1 + T3 (x2 = 2^N), with T1 = 2^N-1-x1 and T2, T3 the operands
// rotated right by one bit, computed here by integer arithmetic.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module csa_mux_unit_tb;
  int checks = 0, failures = 0;

  logic [2:0]  a3, e3, c3, s3;  logic [3:0]  b3;
  logic [21:0] al, el, cl, sl;  logic [22:0] bl;

  csa_mux_unit #(.N(3)) dut3 (.x1(a3), .x2(b3), .x3(e3), .c(c3), .s(s3));
  csa_mux_unit          dutl (.x1(al), .x2(bl), .x3(el), .c(cl), .s(sl));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // Rotate right by one as arithmetic: (v >> 1) + (v & 1) * 2^(n-1)
  function automatic longint rotr(longint v, int n);
    return (v >> 1) + (v & 1) * (longint'(1) << (n - 1));
  endfunction

  function automatic longint ref_sum(longint x1, longint x2, longint x3, int n);
    longint t1 = (longint'(1) << n) - 1 - x1;
    longint t2 = (x2 == (longint'(1) << n)) ? (longint'(1) << (n - 1)) - 1 : rotr(x2, n);
    return t1 + t2 + rotr(x3, n);
  endfunction

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 8; a++)
      for (int b = 0; b <= 8; b++)
        for (int e = 0; e < 7; e++) begin
          a3 = 3'(a); b3 = 4'(b); e3 = 3'(e); #1;
          check(longint'(s3) + 2 * longint'(c3) == ref_sum(a, b, e, 3),
                $sformatf("3b (%0d,%0d,%0d) c=%b s=%b", a, b, e, c3, s3));
        end
    // Worked example (1,7,1): T1=110, T2=111, T3=100, sum 17
    a3 = 3'd1; b3 = 4'd7; e3 = 3'd1; #1;
    check(longint'(s3) + 2 * longint'(c3) == 17, "example (1,7,1)");
    for (int i = 0; i < 3000; i++) begin
      al = 22'($urandom);
      bl = (i % 8 == 0) ? 23'(1 << 22) : 23'($urandom % ((1 << 22) + 1));
      el = 22'($urandom % ((1 << 22) - 1)); #1;
      check(longint'(sl) + 2 * longint'(cl) == ref_sum(longint'(al), longint'(bl), longint'(el), 22),
            $sformatf("22b (%h,%h,%h)", al, bl, el));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
