// Self-checking testbench for mod_decrementer: every input of 3-bit and
// 8-bit instances, random and corner inputs at 32 bits. Reference:
// (z - 1) mod (2^N - 1) for z in [0, 2^N-2]; all ones (the second code for
// zero) must give 2^N - 2.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module mod_decrementer_tb;
  int checks = 0, failures = 0;

  logic [2:0]  z3, y3;
  logic [7:0]  z8, y8;
  logic [31:0] zl, yl;

  mod_decrementer #(.N(3)) dut3 (.z(z3), .y(y3));
  mod_decrementer #(.N(8)) dut8 (.z(z8), .y(y8));
  mod_decrementer          dutl (.z(zl), .y(yl));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic longint ref_dec(longint z, int n);
    longint m = (longint'(1) << n) - 1;
    return ((z % m) + m - 1) % m;
  endfunction

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      z3 = 3'(i); #1;
      check(longint'(y3) == ref_dec(i, 3), $sformatf("3b z=%0d y=%0d", i, y3));
    end
    for (int i = 0; i < 256; i++) begin
      z8 = 8'(i); #1;
      check(longint'(y8) == ref_dec(i, 8), $sformatf("8b z=%0d y=%0d", i, y8));
    end
    for (int i = 0; i < 3000; i++) begin
      zl = (i < 4) ? 32'(i) : (i < 8) ? ~32'(i - 4) : $urandom; #1;
      check(longint'(yl) == ref_dec(longint'(zl), 32), $sformatf("32b z=%h y=%h", zl, yl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
