// full_adder_cell: the "F" cell of the bit-addition stage of the three-operand adder.
// It adds three bits of equal weight and returns their sum bit S'_i = a ^ b ^ c and
// their carry bit cy_i = majority(a, b, c). The carry has twice the weight of the sum
// and is consumed one position to the left by the base logic.
// Purely combinational: no clock, no state. The two equations are the ones the
// adder's first stage is defined by; the gate-level form is left to synthesis.
module full_adder_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic s_f,  // S'_i
  output logic cy    // cy_i
);
  always_comb begin
    s_f = a ^ b ^ c;
    cy  = (a & b) | (b & c) | (c & a);
  end
endmodule
