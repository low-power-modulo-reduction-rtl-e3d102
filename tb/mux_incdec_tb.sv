// Self-checking testbench for mux_incdec: both modes for every input of a
// 6-bit instance, random and corner inputs of a 32-bit (default) instance.
// Reference: z + 1 / z - 1 modulo 2^N; cout_n low on increment of all ones
// and on decrement of zero.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module mux_incdec_tb;
  localparam int unsigned NS = 6;
  localparam int unsigned NL = 32;
  int checks = 0, failures = 0;

  logic [NS-1:0] zs, ys;  logic ms, cs;
  logic [NL-1:0] zl, yl;  logic ml, cl;

  mux_incdec #(.N(NS)) dut_s (.z(zs), .inc_n_dec(ms), .y(ys), .cout_n(cs));
  mux_incdec           dut_l (.z(zl), .inc_n_dec(ml), .y(yl), .cout_n(cl));

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
    for (int m = 0; m < 2; m++)
      for (int i = 0; i < (1 << NS); i++) begin
        zs = NS'(i); ms = m[0]; #1;
        if (ms) begin
          check(ys == NS'(i - 1), $sformatf("dec z=%0d y=%0d", i, ys));
          check(cs == (i != 0), "dec cout_n");
        end else begin
          check(ys == NS'(i + 1), $sformatf("inc z=%0d y=%0d", i, ys));
          check(cs == (i != (1 << NS) - 1), "inc cout_n");
        end
      end
    for (int i = 0; i < 4000; i++) begin
      zl = (i < 8) ? NL'(i) : (i < 16) ? ~NL'(i - 8) : $urandom;
      ml = i[0]; #1;
      check(yl == (ml ? zl - 1'b1 : zl + 1'b1), $sformatf("32b z=%h m=%b y=%h", zl, ml, yl));
      check(cl == (ml ? (zl != 0) : (zl != '1)), "32b cout_n");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
