// Self-checking testbench for mod_sub_2n1: every (x, y) pair of 3-bit and
// 6-bit instances, random pairs of a 32-bit instance. Reference:
// (x - y) mod (2^N + 1) by integer arithmetic; cn = (x >= y). Also counts
// that the d = 2^N result (top bit set) was produced.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module mod_sub_2n1_tb;
  int checks = 0, failures = 0;

  logic [2:0]  x3, y3;  logic [3:0]  d3;  logic c3;
  logic [5:0]  x6, y6;  logic [6:0]  d6;  logic c6;
  logic [31:0] xl, yl;  logic [32:0] dl;  logic cl;

  mod_sub_2n1 #(.N(3)) dut3 (.x(x3), .y(y3), .d(d3), .cn(c3));
  mod_sub_2n1 #(.N(6)) dut6 (.x(x6), .y(y6), .d(d6), .cn(c6));
  mod_sub_2n1 #(.N(32)) dutl (.x(xl), .y(yl), .d(dl), .cn(cl));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic longint ref_sub(longint x, longint y, int n);
    longint m = (longint'(1) << n) + 1;
    return (((x - y) % m) + m) % m;
  endfunction

  initial begin : watchdog
    #1ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int top_seen = 0;
    for (int a = 0; a < 8; a++)
      for (int b = 0; b < 8; b++) begin
        x3 = 3'(a); y3 = 3'(b); #1;
        check(longint'(d3) == ref_sub(a, b, 3), $sformatf("3b %0d-%0d d=%0d", a, b, d3));
        check(c3 == (a >= b), "3b cn");
      end
    // Worked example: |1 - 7| mod 9 = 3
    x3 = 3'd1; y3 = 3'd7; #1; check(d3 == 4'd3, "example |1-7|_9");
    for (int a = 0; a < 64; a++)
      for (int b = 0; b < 64; b++) begin
        x6 = 6'(a); y6 = 6'(b); #1;
        check(longint'(d6) == ref_sub(a, b, 6), $sformatf("6b %0d-%0d d=%0d", a, b, d6));
        check(c6 == (a >= b), "6b cn");
        if (d6[6]) top_seen++;
      end
    check(top_seen > 0, "result 2^N produced");
    for (int i = 0; i < 3000; i++) begin
      xl = $urandom; yl = (i < 10) ? xl + 32'(i) : $urandom; #1;
      check(longint'(dl) == ref_sub(longint'(xl), longint'(yl), 32), $sformatf("32b %h-%h d=%h", xl, yl, dl));
      check(cl == (xl >= yl), "32b cn");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
