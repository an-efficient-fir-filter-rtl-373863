// bit_addition_logic: stage 1 of the three-operand adder.
// A row of N full_adder_cell instances reduces three N-bit operands a, b, c to two
// N-bit vectors without any carry propagation: the bitwise sums S' (weight 2^i) and
// the bitwise carries cy (weight 2^(i+1)), so that a + b + c = S' + 2*cy.
// Combinational; every output bit depends on only three input bits, so the stage
// costs one full-adder delay whatever N is.
module bit_addition_logic #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s_f,  // S'_i
  output logic [N-1:0] cy    // cy_i
);
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder_cell u_fa (
      .a  (a[i]),
      .b  (b[i]),
      .c  (c[i]),
      .s_f(s_f[i]),
      .cy (cy[i])
    );
  end
endmodule
