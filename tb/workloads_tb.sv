// Runs the unit sizes for which results are usually quoted:
//   - residue-to-binary converter for {2^n, 2^n+1, 2^n-1} with a 32-bit
//     dynamic range (n = 11, 2^11 (2^22 - 1) > 2^32) and a 64-bit dynamic
//     range (n = 22, 2^22 (2^44 - 1) > 2^64);
//   - unsigned MUX-based incrementer/decrementer, 32 and 64 bits;
//   - modulo 2^n-1 decrementer, 32 and 64 bits;
//   - modulo 2^n-1 incrementer with double zero (the form compared with an
//     adder-based incrementer) and with single zero, 32 and 64 bits.
// Every unit gets corner operands and random ones; results are compared
// with plain integer arithmetic. Both sizes of a unit share the loop.
// Timing: the unit is combinational; each input set is held for one time
// unit before the outputs are compared, and a watchdog ends a hung run.
module workloads_tb;
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

  // converters
  logic [10:0] a1_32, a3_32;
  logic [11:0] a2_32;
  logic [32:0] x_32;
  logic [21:0] a1_64, a3_64;
  logic [22:0] a2_64;
  logic [65:0] x_64;
  rb_converter_n1 #(.N(11)) conv32 (.x1(a1_32), .x2(a2_32), .x3(a3_32), .x(x_32));
  rb_converter_n1 #(.N(22)) conv64 (.x1(a1_64), .x2(a2_64), .x3(a3_64), .x(x_64));

  // incrementer/decrementers, modulo units
  logic [31:0] z32, y32, md32, mi32, ms32;
  logic [63:0] z64, y64, md64, mi64, ms64;
  logic        m, c32, c64;
  mux_incdec         #(.N(32)) id32 (.z(z32), .inc_n_dec(m), .y(y32), .cout_n(c32));
  mux_incdec         #(.N(64)) id64 (.z(z64), .inc_n_dec(m), .y(y64), .cout_n(c64));
  mod_decrementer    #(.N(32)) md_32 (.z(z32), .y(md32));
  mod_decrementer    #(.N(64)) md_64 (.z(z64), .y(md64));
  mod_incrementer_dz #(.N(32)) mi_32 (.z(z32), .y(mi32));
  mod_incrementer_dz #(.N(64)) mi_64 (.z(z64), .y(mi64));
  mod_incrementer    #(.N(32)) ms_32 (.z(z32), .y(ms32));
  mod_incrementer    #(.N(64)) ms_64 (.z(z64), .y(ms64));

  task automatic conv(input logic [65:0] v32, input logic [65:0] v64);
    logic [65:0] p32, p64;
    p32 = 66'd1 << 11; p64 = 66'd1 << 22;
    a1_32 = 11'(v32 % p32); a2_32 = 12'(v32 % (p32 + 1)); a3_32 = 11'(v32 % (p32 - 1));
    a1_64 = 22'(v64 % p64); a2_64 = 23'(v64 % (p64 + 1)); a3_64 = 22'(v64 % (p64 - 1));
    #1;
    check(66'(x_32) == v32, $sformatf("conv32 X=%0d got %0d", v32, x_32));
    check(x_64 == v64, $sformatf("conv64 X=%0h got %0h", v64, x_64));
  endtask

  task automatic units(input logic [63:0] v, input logic mode);
    logic [64:0] mm;      // 2^64 - 1
    logic [64:0] vv;
    z32 = v[31:0]; z64 = v; m = mode; #1;
    mm = (65'd1 << 64) - 1;
    vv = {1'b0, v};
    // unsigned inc/dec
    check(y32 == (mode ? z32 - 1'b1 : z32 + 1'b1), "incdec32");
    check(c32 == (mode ? (z32 != '0) : (z32 != '1)), "incdec32 cout_n");
    check(y64 == (mode ? v - 1'b1 : v + 1'b1), "incdec64");
    check(c64 == (mode ? (v != '0) : (v != '1)), "incdec64 cout_n");
    // modulo 2^n-1: inputs taken in [0, 2^n-2] for the decrementer and the
    // single-zero incrementer, any input for the double-zero incrementer
    if (z32 != '1) begin
      check(md32 == ((z32 == '0) ? 32'hffff_fffe : z32 - 1'b1), "moddec32");
      check(ms32 == ((z32 == 32'hffff_fffe) ? '0 : z32 + 1'b1), "modinc32");
    end
    if (v != '1) begin
      check(md64 == ((v == '0) ? 64'hffff_ffff_ffff_fffe : v - 1'b1), "moddec64");
      check(ms64 == ((v == 64'hffff_ffff_ffff_fffe) ? '0 : v + 1'b1), "modinc64");
    end
    check(mi32 == ((z32 == '1) ? 32'd1 : z32 + 1'b1), "modinc_dz32");
    check(65'(mi64) == ((vv == mm) ? 65'd1 : vv + 1), "modinc_dz64");
  endtask

  initial begin
    logic [65:0] m32, m64;
    m32 = (66'd1 << 11) * ((66'd1 << 22) - 1);
    m64 = (66'd1 << 22) * ((66'd1 << 44) - 1);
    conv(0, 0);
    conv(m32 - 1, m64 - 1);
    conv(66'd1 << 32, 66'd1 << 64);
    conv(66'hffff_ffff, 66'hffff_ffff_ffff_ffff);
    for (int i = 0; i < 20000; i++)
      conv({2'($urandom), $urandom, $urandom} % m32, {2'($urandom), $urandom, $urandom} % m64);
    for (int i = 0; i < 8; i++) begin
      units(64'(i), i[0]);
      units(~64'(i), i[0]);
      units({32'($urandom), 32'(i)}, i[0]);
      units({32'($urandom), ~32'(i)}, i[0]);
    end
    for (int i = 0; i < 20000; i++) units({$urandom, $urandom}, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
