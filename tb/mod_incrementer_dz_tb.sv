// Self-checking testbench for mod_incrementer_dz (double zero): every input
// of 3-bit and 8-bit instances, random inputs at 32 bits. Reference: the
// output must be congruent to z + 1 modulo 2^N - 1, and z = 2^N-2 must give
// the all-ones code of zero.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module mod_incrementer_dz_tb;
  int checks = 0, failures = 0;

  logic [2:0]  z3, y3;
  logic [7:0]  z8, y8;
  logic [31:0] zl, yl;

  mod_incrementer_dz #(.N(3)) dut3 (.z(z3), .y(y3));
  mod_incrementer_dz #(.N(8)) dut8 (.z(z8), .y(y8));
  mod_incrementer_dz          dutl (.z(zl), .y(yl));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic logic congruent_inc(longint z, longint y, int n);
    longint m = (longint'(1) << n) - 1;
    return (y % m) == ((z + 1) % m);
  endfunction

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      z3 = 3'(i); #1;
      check(congruent_inc(i, y3, 3), $sformatf("3b z=%0d y=%0d", i, y3));
    end
    z3 = 3'd6; #1; check(y3 == 3'b111, "3b z=6 gives all ones");
    for (int i = 0; i < 256; i++) begin
      z8 = 8'(i); #1;
      check(congruent_inc(i, y8, 8), $sformatf("8b z=%0d y=%0d", i, y8));
      if (i != 254 && i != 255) check(y8 == 8'(i + 1), "8b plain increment");
    end
    for (int i = 0; i < 3000; i++) begin
      zl = (i < 4) ? 32'(i) : (i < 8) ? ~32'(i - 4) : $urandom; #1;
      check(congruent_inc(longint'(zl), longint'(yl), 32), $sformatf("32b z=%h y=%h", zl, yl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
