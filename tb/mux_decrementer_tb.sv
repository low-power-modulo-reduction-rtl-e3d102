// Self-checking testbench for mux_decrementer: every input of an 8-bit
// instance, then random inputs and the corner values of a 32-bit
// (default-width) instance. Reference: z - 1 modulo 2^N, and cout_n = 0
// exactly for z = 0.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module mux_decrementer_tb;
  localparam int unsigned NS = 8;
  localparam int unsigned NL = 32;
  int checks = 0, failures = 0;

  logic [NS-1:0] zs, ys;  logic cs;
  logic [NL-1:0] zl, yl;  logic cl;

  mux_decrementer #(.N(NS)) dut_s (.z(zs), .y(ys), .cout_n(cs));
  mux_decrementer           dut_l (.z(zl), .y(yl), .cout_n(cl));

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
    for (int i = 0; i < (1 << NS); i++) begin
      zs = NS'(i); #1;
      check(ys == NS'(i - 1), $sformatf("8b z=%0d y=%0d", i, ys));
      check(cs == (i != 0), $sformatf("8b cout_n z=%0d", i));
    end
    for (int i = 0; i < 2000; i++) begin
      zl = (i < 4) ? NL'(i) : (i < 8) ? ~NL'(i - 4) : $urandom; #1;
      check(yl == zl - 1'b1, $sformatf("32b z=%h y=%h", zl, yl));
      check(cl == (zl != 0), "32b cout_n");
    end
    // Worked example of the algorithm: 10110100 - 1 = 10110011
    zs = 8'b1011_0100; #1;
    check(ys == 8'b1011_0011, "example 10110100");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
