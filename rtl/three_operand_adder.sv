// three_operand_adder: adds three N-bit unsigned operands and a carry-in in one
// combinational pass, {cout, s} = a + b + c + cin (N+2 bits).
//
// Instead of a carry-save row followed by a ripple-carry adder, the carry-save row is
// merged into a parallel-prefix adder, giving four stages:
//   1. bit_addition_logic: N full adders give S'_i and cy_i with a+b+c = S' + 2*cy.
//   2. base_logic: half adders (saltire cells) on S'_i and cy_{i-1} (Cin at bit 0)
//      give G_i and P_i for positions 0..N.
//   3. pg_logic: a Han-Carlson-style prefix network of black and grey cells gives
//      the carry G_{i:0} of every position in about log2(N) cell delays.
//   4. sum_logic: S_i = P_i ^ G_{i-1:0}, S_0 = P_0, Cout = G_{N:0}.
// The stage structure and equations follow the published adder; the prefix network
// is generated for any N from the pattern of its 16-bit drawing. N must be at least 2.
// No clock and no state: the result is valid one combinational delay after the inputs.
module three_operand_adder #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  input  logic         cin,
  output logic [N:0]   s,     // S_0..S_N
  output logic         cout   // G_{N:0}
);
  logic [N-1:0] s_f, cy;
  logic [N:0]   g, p, gc;

  bit_addition_logic #(.N(N)) u_bit_add (
    .a  (a),
    .b  (b),
    .c  (c),
    .s_f(s_f),
    .cy (cy)
  );

  base_logic #(.N(N)) u_base (
    .s_f(s_f),
    .cy (cy),
    .cin(cin),
    .g  (g),
    .p  (p)
  );

  pg_logic #(.W(N + 1)) u_pg (
    .g (g),
    .p (p),
    .gc(gc)
  );

  sum_logic #(.N(N)) u_sum (
    .p   (p),
    .gc  (gc),
    .s   (s),
    .cout(cout)
  );
endmodule
