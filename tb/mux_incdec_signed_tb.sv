// Self-checking testbench for mux_incdec_signed: both modes for every input
// of a 4-bit instance (the 4-bit truth table of signed increment and
// decrement), every input of an 8-bit instance, and random inputs at 32 bits.
// Reference: signed z +/- 1 computed as integers; ovf_n low exactly when the
// true result leaves [-2^(N-1), 2^(N-1)-1].
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module mux_incdec_signed_tb;
  int checks = 0, failures = 0;

  logic [3:0]  z4, y4;  logic m4, o4;
  logic [7:0]  z8, y8;  logic m8, o8;
  logic [31:0] zl, yl;  logic ml, ol;

  mux_incdec_signed #(.N(4)) dut4 (.z(z4), .inc_n_dec(m4), .y(y4), .ovf_n(o4));
  mux_incdec_signed #(.N(8)) dut8 (.z(z8), .inc_n_dec(m8), .y(y8), .ovf_n(o8));
  mux_incdec_signed          dutl (.z(zl), .inc_n_dec(ml), .y(yl), .ovf_n(ol));

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
    int ovf_seen = 0;
    for (int m = 0; m < 2; m++)
      for (int v = -8; v < 8; v++) begin
        int r;
        z4 = 4'(v); m4 = m[0]; #1;
        r = m4 ? v - 1 : v + 1;
        check(y4 == 4'(r), $sformatf("4b v=%0d m=%0d y=%b", v, m, y4));
        check(o4 == (r >= -8 && r <= 7), $sformatf("4b ovf v=%0d m=%0d", v, m));
        if (!o4) ovf_seen++;
      end
    check(ovf_seen == 2, "exactly two overflow cases at 4 bits");
    for (int m = 0; m < 2; m++)
      for (int v = -128; v < 128; v++) begin
        int r;
        z8 = 8'(v); m8 = m[0]; #1;
        r = m8 ? v - 1 : v + 1;
        check(y8 == 8'(r), $sformatf("8b v=%0d m=%0d", v, m));
        check(o8 == (r >= -128 && r <= 127), $sformatf("8b ovf v=%0d m=%0d", v, m));
      end
    for (int i = 0; i < 4000; i++) begin
      longint v, r;
      zl = (i < 8) ? 32'h7fff_fffc + 32'(i) : $urandom;
      ml = i[0]; #1;
      v = longint'($signed(zl));
      r = ml ? v - 1 : v + 1;
      check(yl == 32'(r), $sformatf("32b z=%h m=%b", zl, ml));
      check(ol == (r >= -64'sd2147483648 && r <= 64'sd2147483647), $sformatf("32b ovf z=%h m=%b", zl, ml));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
