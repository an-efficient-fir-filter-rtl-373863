// multiplier: one tap multiplier of the FIR filter, y = beta * x.
// Unsigned operands, full-width product (A_W + B_W bits), so no precision is lost
// before the adder tree. Combinational. The filter only asks for a fast multiplier of
// sufficient precision; its structure is left to synthesis here.
module multiplier #(
  parameter int unsigned A_W = 8,  // sample width
  parameter int unsigned B_W = 8   // coefficient width
) (
  input  logic [A_W-1:0]     x,
  input  logic [B_W-1:0]     beta,
  output logic [A_W+B_W-1:0] y
);
  always_comb y = (A_W + B_W)'(x) * (A_W + B_W)'(beta);
endmodule
