// sum_logic: stage 4 of the three-operand adder.
// Forms the N+1 sum bits from the bit propagates P_i and the prefix carries G_{i:0}:
//   S_0 = P_0,  S_i = P_i ^ G_{i-1:0} (i = 1..N),  Cout = G_{N:0}
// {cout, s} is then the N+2-bit total a + b + c + cin. Combinational, one XOR delay.
module sum_logic #(
  parameter int unsigned N = 16
) (
  input  logic [N:0] p,     // P_i from base_logic
  input  logic [N:0] gc,    // G_{i:0} from pg_logic
  output logic [N:0] s,     // S_0..S_N
  output logic       cout   // G_{N:0}
);
  always_comb begin
    s    = p ^ {gc[N-1:0], 1'b0};
    cout = gc[N];
  end
endmodule
