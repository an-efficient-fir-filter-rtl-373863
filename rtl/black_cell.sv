// black_cell: prefix operator of the PG-logic stage of the three-operand adder.
// Merges a high group (i:k) with the adjacent low group (k-1:j) into group (i:j):
//   G_{i:j} = G_{i:k} | (P_{i:k} & G_{k-1:j})
//   P_{i:j} = P_{i:k} & P_{k-1:j}
// Used where the merged group does not yet reach bit 0. Combinational.
module black_cell (
  input  logic g_hi,  // G_{i:k}
  input  logic p_hi,  // P_{i:k}
  input  logic g_lo,  // G_{k-1:j}
  input  logic p_lo,  // P_{k-1:j}
  output logic g,     // G_{i:j}
  output logic p      // P_{i:j}
);
  always_comb begin
    g = g_hi | (p_hi & g_lo);
    p = p_hi & p_lo;
  end
endmodule
