// Testbench for mod_reduce. Four instances:
//   - the default moduli 2, 3, 4, 5 with an 11-bit K: every K from 0 to 2047,
//     plus the worked example |1099| mod 120 = 19 checked by name;
//   - moduli 8, 7, 5 (a power of two first, so the low digit is a bit slice)
//     with a 16-bit K: every K;
//   - moduli 5, 16, 9, 7, 11 with a 24-bit K: the first 65,536 K and 20,000
//     random K;
//   - two moduli 13 and 2^10 with a 32-bit K: random K.
// Every result is compared with the plain K mod (product of the moduli).
// Timing: the unit is combinational; each K is held for one time unit
// before the outputs are compared, and a watchdog ends a hung run.
module mod_reduce_tb;
  int checks = 0, failures = 0;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin : watchdog
    #10ms; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned PB [3] = '{8, 7, 5};
  localparam int unsigned PC [5] = '{5, 16, 9, 7, 11};
  localparam int unsigned PD [2] = '{13, 1024};

  logic [10:0] ka;  logic [6:0]  ra;
  logic [15:0] kb;  logic [8:0]  rb;
  logic [23:0] kc;  logic [15:0] rc;
  logic [31:0] kd;  logic [13:0] rd;

  mod_reduce                                 dut_a (.k(ka), .r(ra));
  mod_reduce #(.NM(3), .P(PB), .KW(16)) dut_b (.k(kb), .r(rb));
  mod_reduce #(.NM(5), .P(PC), .KW(24)) dut_c (.k(kc), .r(rc));
  mod_reduce #(.NM(2), .P(PD), .KW(32)) dut_d (.k(kd), .r(rd));

  task automatic apply(input logic [31:0] v);
    ka = v[10:0]; kb = v[15:0]; kc = v[23:0]; kd = v;
    #1;
    check(32'(ra) == 32'(ka) % 120, $sformatf("{2,3,4,5} K=%0d got %0d", ka, ra));
    check(32'(rb) == 32'(kb) % 280, $sformatf("{8,7,5} K=%0d got %0d", kb, rb));
    check(32'(rc) == 32'(kc) % 55440, $sformatf("{5,16,9,7,11} K=%0d got %0d", kc, rc));
    check(32'(rd) == kd % 13312, $sformatf("{13,1024} K=%0d got %0d", kd, rd));
  endtask

  initial begin
    ka = 11'd1099; #1;
    check(ra == 7'd19, "example |1099| mod 120 = 19");
    for (int v = 0; v < 65536; v++) apply(32'(v));
    for (int t = 0; t < 20000; t++) apply($urandom);
    apply('1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
