// fir_filter: 9-tap direct-form FIR filter whose additions are all done by
// three-operand adders.
//
//   yn = b[0]*x[n] + b[1]*x[n-1] + ... + b[8]*x[n-8]
//
// Structure:
//   * Delay line: eight chained unit_delay registers X1..X8 hold x[n-1]..x[n-8].
//   * Nine multiplier instances form the full-width products (16 bits each).
//   * Adder tree of four three_operand_adder instances: three 16-bit adders sum
//     taps (0,1,2), (3,4,5) and (6,7,8) to 18 bits each; one 18-bit adder sums those
//     three to the 20-bit output. Nine operands need only four adders instead of the
//     eight a tree of two-operand adders would take. Carry-in is 0 everywhere.
// The nine taps, the 8-bit samples and the use of the three-operand adder follow the
// published filter; coefficients as inputs, their 8-bit unsigned format, the tree
// grouping and the reset are this design's choices.
//
// Interface and timing: one sample per rising clk edge. yn is combinational from xn
// and the delay registers, so it gives y[n] for the xn presented in the same cycle;
// the edge then shifts xn into X1. rst (synchronous, active high) clears X1..X8.
// The output width holds the worst case 9 * 255 * 255, so yn never overflows.
module fir_filter
  import fir_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  sample_t xn,
  input  coef_t   b [TAPS],
  output acc_t    yn
);
  // x_tap[k] = x[n-k]; x_tap[1..8] are the registers X1..X8.
  sample_t x_tap [TAPS];
  prod_t   prod  [TAPS];

  assign x_tap[0] = xn;

  for (genvar k = 1; k < TAPS; k++) begin : g_delay
    unit_delay #(.B(DATA_W)) u_x (
      .clk(clk),
      .rst(rst),
      .x  (x_tap[k-1]),
      .y  (x_tap[k])
    );
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_mul
    multiplier #(.A_W(DATA_W), .B_W(COEF_W)) u_mul (
      .x   (x_tap[k]),
      .beta(b[k]),
      .y   (prod[k])
    );
  end

  // First level: three groups of three products.
  logic [L1_W-1:0] part [3];

  for (genvar m = 0; m < 3; m++) begin : g_l1
    logic [PROD_W:0] s;
    logic            co;
    three_operand_adder #(.N(PROD_W)) u_add (
      .a   (prod[3*m]),
      .b   (prod[3*m+1]),
      .c   (prod[3*m+2]),
      .cin (1'b0),
      .s   (s),
      .cout(co)
    );
    assign part[m] = {co, s};
  end

  // Second level: the three partial sums.
  logic [L1_W:0] s_out;
  logic          co_out;

  three_operand_adder #(.N(L1_W)) u_add_out (
    .a   (part[0]),
    .b   (part[1]),
    .c   (part[2]),
    .cin (1'b0),
    .s   (s_out),
    .cout(co_out)
  );

  assign yn = {co_out, s_out};
endmodule
