// Self-checking testbench for cpa_unit: every h in [0, 2^N-2] and k in
// [0, 2^N] of a 4-bit instance, random pairs at 22 bits (default).
// Reference: y = (2^N + 1) h + k by integer arithmetic. Counts that both
// ways of taking h + 1 (CPA carry and k = 2^N) occurred.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module cpa_unit_tb;
  int checks = 0, failures = 0;

  logic [3:0]  h4;  logic [4:0]  k4;  logic [7:0]  y4;
  logic [21:0] hl;  logic [22:0] kl;  logic [43:0] yl;

  cpa_unit #(.N(4)) dut4 (.h(h4), .k(k4), .y(y4));
  cpa_unit          dutl (.h(hl), .k(kl), .y(yl));

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
    int carry_seen = 0, kn_seen = 0;
    for (int h = 0; h < 15; h++)
      for (int k = 0; k <= 16; k++) begin
        h4 = 4'(h); k4 = 5'(k); #1;
        check(int'(y4) == 17 * h + k, $sformatf("4b h=%0d k=%0d y=%0d", h, k, y4));
        if (k == 16) kn_seen++;
        else if (h + k >= 16) carry_seen++;
      end
    check(carry_seen > 0 && kn_seen > 0, "both increment causes exercised");
    // Worked example: h = 2, k = 3, n = 3 is 9*2+3 = 21; at n = 4: 17*2+3
    h4 = 4'd2; k4 = 5'd3; #1; check(y4 == 8'd37, "small example");
    for (int i = 0; i < 3000; i++) begin
      longint h, k;
      hl = 22'($urandom % ((1 << 22) - 1));
      kl = (i % 8 == 0) ? 23'(1 << 22) : 23'($urandom % (1 << 22));
      #1;
      h = longint'(hl); k = longint'(kl);
      check(longint'(yl) == ((longint'(1) << 22) + 1) * h + k, $sformatf("22b h=%h k=%h", hl, kl));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
