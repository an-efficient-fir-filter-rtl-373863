// base_logic: stage 2 of the three-operand adder.
// Turns the two vectors of stage 1 (S' and cy, where cy has one position more weight)
// into per-position generate/propagate pairs for positions 0..N, i.e. N+1 positions.
//   position 0     : saltire cell on S'_0 and the external carry-in Cin
//   position 1..N-1: saltire cell on S'_i and cy_{i-1}
//   position N     : no S'_N exists, so G_N = 0 and P_N = cy_{N-1}
// The top position is this design's reading of the adder diagram, which draws base
// outputs for positions 0..n; it needs no cell because one of its two inputs is zero.
// Combinational, one half-adder delay.
module base_logic #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] s_f,  // S' from bit_addition_logic
  input  logic [N-1:0] cy,   // cy from bit_addition_logic
  input  logic         cin,  // external carry-in
  output logic [N:0]   g,    // G_i, i = 0..N
  output logic [N:0]   p     // P_i, i = 0..N
);
  logic [N-1:0] cy_prev;
  assign cy_prev = {cy[N-2:0], cin};

  for (genvar i = 0; i < N; i++) begin : g_cell
    saltire_cell u_cell (
      .s_f    (s_f[i]),
      .cy_prev(cy_prev[i]),
      .g      (g[i]),
      .p      (p[i])
    );
  end

  assign g[N] = 1'b0;
  assign p[N] = cy[N-1];
endmodule
