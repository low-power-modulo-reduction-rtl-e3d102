// Self-checking testbench for rb_converter_n1. For N = 3 and N = 5 every X
// in the dynamic range [0, 2^N (2^2N - 1)) is converted to its residues
// (X mod 2^N, X mod 2^N+1, X mod 2^N-1) and back; the result must be X. At
// the default N = 22 random X values are checked the same way. The worked
// example X = 169 = (1, 7, 1) at N = 3 is included in the sweep.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module rb_converter_n1_tb;
  int checks = 0, failures = 0;

  logic [2:0]  a3, e3;  logic [3:0]  b3;  logic [8:0]  x3o;
  logic [4:0]  a5, e5;  logic [5:0]  b5;  logic [14:0] x5o;
  logic [21:0] al, el;  logic [22:0] bl;  logic [65:0] xlo;

  rb_converter_n1 #(.N(3)) dut3 (.x1(a3), .x2(b3), .x3(e3), .x(x3o));
  rb_converter_n1 #(.N(5)) dut5 (.x1(a5), .x2(b5), .x3(e5), .x(x5o));
  rb_converter_n1          dutl (.x1(al), .x2(bl), .x3(el), .x(xlo));

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8 * 63; v++) begin
      a3 = 3'(v % 8); b3 = 4'(v % 9); e3 = 3'(v % 7); #1;
      check(int'(x3o) == v, $sformatf("N=3 X=%0d got %0d", v, x3o));
    end
    a3 = 3'd1; b3 = 4'd7; e3 = 3'd1; #1; check(x3o == 9'd169, "example X=169");
    for (int v = 0; v < 32 * 1023; v++) begin
      a5 = 5'(v % 32); b5 = 6'(v % 33); e5 = 5'(v % 31); #1;
      check(int'(x5o) == v, $sformatf("N=5 X=%0d got %0d", v, x5o));
    end
    for (int i = 0; i < 5000; i++) begin
      logic [65:0] xv, m;
      m  = (66'(1) << 22) * ((66'(1) << 44) - 66'(1));
      xv = {2'($urandom), $urandom, $urandom} % m;
      if (i == 0) xv = '0;
      if (i == 1) xv = m - 1;
      al = 22'(xv % (66'(1) << 22));
      bl = 23'(xv % ((66'(1) << 22) + 66'(1)));
      el = 22'(xv % ((66'(1) << 22) - 66'(1)));
      #1;
      check(xlo == xv, $sformatf("N=22 X=%h got %h", xv, xlo));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
