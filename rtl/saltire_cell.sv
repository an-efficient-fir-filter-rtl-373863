// saltire_cell: one cell of the base-logic stage of the three-operand adder.
// It combines the sum bit S'_i of a full adder with the carry cy_{i-1} of the full
// adder to its right (or the external carry-in at position 0) into the bit-level
// generate G_i = S'_i & cy_{i-1} and propagate P_i = S'_i ^ cy_{i-1}: a half adder
// whose outputs feed the carry-prefix network. Combinational.
module saltire_cell (
  input  logic s_f,      // S'_i
  input  logic cy_prev,  // cy_{i-1}, or Cin at position 0
  output logic g,        // G_i
  output logic p         // P_i
);
  always_comb begin
    g = s_f & cy_prev;
    p = s_f ^ cy_prev;
  end
endmodule
