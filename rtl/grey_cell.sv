// grey_cell: generate-only prefix operator of the PG-logic stage.
// Merges a high group (i:k) with a low group (k-1:0) that already reaches bit 0:
//   G_{i:0} = G_{i:k} | (P_{i:k} & G_{k-1:0})
// The group propagate is not needed once a group reaches bit 0, so it is not formed.
// Combinational.
module grey_cell (
  input  logic g_hi,  // G_{i:k}
  input  logic p_hi,  // P_{i:k}
  input  logic g_lo,  // G_{k-1:0}
  output logic g      // G_{i:0}
);
  always_comb g = g_hi | (p_hi & g_lo);
endmodule
