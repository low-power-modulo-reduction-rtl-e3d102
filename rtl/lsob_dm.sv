// Decision module (DM) of the MUX-based incrementers and decrementers.
//
// A prefix-OR chain: d[j] = a[0] | a[1] | ... | a[j]. Fed with the operand
// Z, d[j] == 0 means bits j..0 of Z are all zero, so d[j-1] tells bit j
// whether the least significant one bit (LSOB) lies below it. Fed with ~Z,
// it finds the least significant zero bit instead, which is what an
// incrementer needs. d[N-1] doubles as the (active-low) carry out of the
// unit that uses it.
//
// The linear chain of two-input OR gates is the structure drawn for every
// decision module in the MUX-based units; a synthesis tool is free to turn
// it into a parallel prefix tree. Purely combinational. d[0] is a[0] itself,
// a plain wire with no gate, which keeps the chain's indexing uniform.
//
// From the original design: the OR-chain itself. Own choice: making it a
// separate helper module shared by all MUX-based units.
module lsob_dm #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  output logic [N-1:0] d
);
  assign d[0] = a[0];
  for (genvar j = 1; j < N; j++) begin : g_or
    assign d[j] = d[j-1] | a[j];
  end
endmodule
