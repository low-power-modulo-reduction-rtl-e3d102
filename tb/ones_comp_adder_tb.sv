// Self-checking testbench for ones_comp_adder: every (s, c) pair of a 4-bit
// instance except both all ones, random pairs of a 22-bit (default)
// instance. Reference: (s + 2c) mod (2^N - 1), so zero must come out as
// all zeros, never as all ones.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module ones_comp_adder_tb;
  int checks = 0, failures = 0;

  logic [3:0]  s4, c4, z4;
  logic [21:0] sl, cl, zl;

  ones_comp_adder #(.N(4)) dut4 (.s(s4), .c(c4), .z(z4));
  ones_comp_adder          dutl (.s(sl), .c(cl), .z(zl));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        if (a == 15 && b == 15) continue;
        s4 = 4'(a); c4 = 4'(b); #1;
        check(int'(z4) == (a + 2 * b) % 15, $sformatf("4b s=%0d c=%0d z=%0d", a, b, z4));
      end
    for (int i = 0; i < 3000; i++) begin
      longint m = (longint'(1) << 22) - 1;
      sl = 22'($urandom); cl = 22'($urandom);
      if (i < 4) begin sl = 22'(m - longint'(i)); cl = 22'(i); end  // sums equal to 2^N-1
      #1;
      check(longint'(zl) == (longint'(sl) + 2 * longint'(cl)) % m, $sformatf("22b s=%h c=%h z=%h", sl, cl, zl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
