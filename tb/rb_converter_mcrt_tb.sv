// Testbench for rb_converter_mcrt. Instances:
//   - the default four moduli {9, 8, 7, 5}: every X in [0, 2520), plus the
//     worked example, residues (7, 4, 3, 2) -> X = 52, checked by name;
//   - {9, 8, 7} and {5, 4, 3}: three-moduli sets, every X;
//   - {7, 16}: two moduli, every X;
//   - {7, 16, 9, 5, 11}: five moduli, every X in [0, 55440);
//   - {17, 32, 31, 15}: every X in [0, 252960) in steps of 7 plus 20,000
//     random X.
// Every X is split into residues that must convert back to X.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module rb_converter_mcrt_tb;
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

  localparam int unsigned PB [3] = '{9, 8, 7};
  localparam int unsigned PC [3] = '{5, 4, 3};
  localparam int unsigned PD [2] = '{7, 16};
  localparam int unsigned PE [5] = '{7, 16, 9, 5, 11};
  localparam int unsigned PF [4] = '{17, 32, 31, 15};

  logic [3:0][3:0] ra;  logic [11:0] xa;
  logic [2:0][3:0] rb;  logic [8:0]  xb;
  logic [2:0][2:0] rc;  logic [5:0]  xc;
  logic [1:0][3:0] rd;  logic [6:0]  xd;
  logic [4:0][3:0] re;  logic [15:0] xe;
  logic [3:0][4:0] rf;  logic [17:0] xf;

  rb_converter_mcrt                       dut_a (.xr(ra), .x(xa));
  rb_converter_mcrt #(.NM(3), .P(PB)) dut_b (.xr(rb), .x(xb));
  rb_converter_mcrt #(.NM(3), .P(PC)) dut_c (.xr(rc), .x(xc));
  rb_converter_mcrt #(.NM(2), .P(PD)) dut_d (.xr(rd), .x(xd));
  rb_converter_mcrt #(.NM(5), .P(PE)) dut_e (.xr(re), .x(xe));
  rb_converter_mcrt #(.NM(4), .P(PF)) dut_f (.xr(rf), .x(xf));

  // drive every instance with X reduced to its own range
  task automatic apply(input int unsigned v);
    int unsigned va, vb, vc, vd, ve, vf;
    va = v % 2520; vb = v % 504; vc = v % 60; vd = v % 112; ve = v % 55440; vf = v % 252960;
    ra = {4'(va % 5), 4'(va % 7), 4'(va % 8), 4'(va % 9)};
    rb = {4'(vb % 7), 4'(vb % 8), 4'(vb % 9)};
    rc = {3'(vc % 3), 3'(vc % 4), 3'(vc % 5)};
    rd = {4'(vd % 16), 4'(vd % 7)};
    re = {4'(ve % 11), 4'(ve % 5), 4'(ve % 9), 4'(ve % 16), 4'(ve % 7)};
    rf = {5'(vf % 15), 5'(vf % 31), 5'(vf % 32), 5'(vf % 17)};
    #1;
    check(32'(xa) == va, $sformatf("{9,8,7,5} X=%0d got %0d", va, xa));
    check(32'(xb) == vb, $sformatf("{9,8,7} X=%0d got %0d", vb, xb));
    check(32'(xc) == vc, $sformatf("{5,4,3} X=%0d got %0d", vc, xc));
    check(32'(xd) == vd, $sformatf("{7,16} X=%0d got %0d", vd, xd));
    check(32'(xe) == ve, $sformatf("{7,16,9,5,11} X=%0d got %0d", ve, xe));
    check(32'(xf) == vf, $sformatf("{17,32,31,15} X=%0d got %0d", vf, xf));
  endtask

  initial begin
    ra = {4'd2, 4'd3, 4'd4, 4'd7}; #1;
    check(xa == 12'd52, "example (7,4,3,2) in {9,8,7,5} -> 52");
    for (int unsigned v = 0; v < 55440; v++) apply(v);
    for (int unsigned v = 55440; v < 252960; v += 7) apply(v);
    for (int t = 0; t < 20000; t++) apply($urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
