// unit_delay: one B-bit memory cell of the FIR delay line, y[n] = x[n-1].
// A register loaded on every rising clock edge, so each edge is one sample period.
// An M-sample delay is M of these in a chain (a B-bit-wide shift register).
// Reset is synchronous and active high and clears the stored sample to zero, so the
// filter starts from an all-zero history.
module unit_delay #(
  parameter int unsigned B = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [B-1:0] x,
  output logic [B-1:0] y
);
  always_ff @(posedge clk) begin
    if (rst) y <= '0;
    else     y <= x;
  end
endmodule
