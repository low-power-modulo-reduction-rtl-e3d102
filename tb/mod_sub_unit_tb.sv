// Self-checking testbench for mod_sub_unit: every (x1, x2) with x1 < 2^N
// and x2 <= 2^N for a 4-bit instance, random pairs at 22 bits (default).
// Reference: k = (x1 - x2) mod (2^N+1) for x2 < 2^N, k = x1 + 1 for
// x2 = 2^N; cn = (x1 >= x2 mod 2^N).
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module mod_sub_unit_tb;
  int checks = 0, failures = 0;

  logic [3:0]  a4;  logic [4:0]  b4, k4;  logic c4;
  logic [21:0] al;  logic [22:0] bl, kl;  logic cl;

  mod_sub_unit #(.N(4)) dut4 (.x1(a4), .x2(b4), .k(k4), .cn(c4));
  mod_sub_unit          dutl (.x1(al), .x2(bl), .k(kl), .cn(cl));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic longint ref_k(longint x1, longint x2, int n);
    longint m = (longint'(1) << n) + 1;
    if (x2 == (longint'(1) << n)) return x1 + 1;
    return (((x1 - x2) % m) + m) % m;
  endfunction

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b <= 16; b++) begin
        a4 = 4'(a); b4 = 5'(b); #1;
        check(longint'(k4) == ref_k(a, b, 4), $sformatf("4b (%0d,%0d) k=%0d", a, b, k4));
        check(c4 == (a >= (b % 16)), "4b cn");
      end
    for (int i = 0; i < 3000; i++) begin
      al = 22'($urandom);
      bl = (i % 8 == 0) ? 23'(1 << 22) : 23'($urandom % (1 << 22));
      if (i == 1) al = '1;   // x1 + 1 = 2^N with x2 = 2^N below
      if (i == 1) bl = 23'(1 << 22);
      #1;
      check(longint'(kl) == ref_k(longint'(al), longint'(bl), 22), $sformatf("22b (%h,%h) k=%h", al, bl, kl));
      check(cl == (al >= bl[21:0]), "22b cn");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
