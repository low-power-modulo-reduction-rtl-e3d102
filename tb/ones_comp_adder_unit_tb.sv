// Self-checking testbench for ones_comp_adder_unit: all legal residue
// triples and both cn values of a 3-bit instance, random triples of a 22-bit
// (default) instance. Reference, by integer arithmetic modulo 2^N-1:
//   x2 < 2^N : h = |2^(N-1) x2 + 2^(N-1) x3 - x1 - (1 - cn)|
//   x2 = 2^N : h = |2^(N-1) - 1 + 2^(N-1) x3 - x1|        (cn is then 1)
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module ones_comp_adder_unit_tb;
  int checks = 0, failures = 0;

  logic [2:0]  a3, e3, h3;  logic [3:0]  b3;  logic c3;
  logic [21:0] al, el, hl;  logic [22:0] bl;  logic cln;

  ones_comp_adder_unit #(.N(3)) dut3 (.x1(a3), .x2(b3), .x3(e3), .cn(c3), .h(h3));
  ones_comp_adder_unit          dutl (.x1(al), .x2(bl), .x3(el), .cn(cln), .h(hl));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic longint ref_h(longint x1, longint x2, longint x3, logic cn, int n);
    longint m = (longint'(1) << n) - 1;
    longint half = longint'(1) << (n - 1);
    longint v;
    if (x2 == (longint'(1) << n)) v = (half - 1) + ((half * x3) % m) + (m - x1 % m);
    else v = ((half * x2) % m) + ((half * x3) % m) + (m - x1 % m) + (cn ? 0 : m - 1);
    return v % m;
  endfunction

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int cn = 0; cn < 2; cn++)
      for (int a = 0; a < 8; a++)
        for (int b = 0; b <= 8; b++)
          for (int e = 0; e < 7; e++) begin
            if (b == 8 && cn == 0) continue;
            a3 = 3'(a); b3 = 4'(b); e3 = 3'(e); c3 = cn[0]; #1;
            check(longint'(h3) == ref_h(a, b, e, c3, 3), $sformatf("3b (%0d,%0d,%0d) cn=%0d h=%0d", a, b, e, cn, h3));
          end
    // Worked example (1,7,1), cn = 0: h = |6 + 7 + 4 - 1|_7 = 2
    a3 = 3'd1; b3 = 4'd7; e3 = 3'd1; c3 = 1'b0; #1; check(h3 == 3'd2, "example h");
    for (int i = 0; i < 3000; i++) begin
      al = 22'($urandom);
      bl = (i % 8 == 0) ? 23'(1 << 22) : 23'($urandom % (1 << 22));
      el = 22'($urandom % ((1 << 22) - 1));
      cln = bl[22] ? 1'b1 : 1'($urandom);
      #1;
      check(longint'(hl) == ref_h(longint'(al), longint'(bl), longint'(el), cln, 22), $sformatf("22b (%h,%h,%h) cn=%b", al, bl, el, cln));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
