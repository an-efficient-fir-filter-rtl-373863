// tb_sum_logic: checks the sum stage at its default width (16 bits) with random
// propagate and carry vectors: S_0 = P_0, S_i = P_i xor G_{i-1:0}, Cout = G_{N:0}.
module tb_sum_logic;
  localparam int N = 16;
  logic [N:0] p, gc, s;
  logic       cout;
  int checks = 0, failures = 0;

  sum_logic #(.N(N)) dut (.p(p), .gc(gc), .s(s), .cout(cout));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N:0] want;
    for (int t = 0; t < 2000; t++) begin
      p = (N+1)'({$urandom, $urandom}); gc = (N+1)'({$urandom, $urandom});
      if (t == 0) begin p = '0; gc = '1; end
      #1;
      want[0] = p[0];
      for (int i = 1; i <= N; i++) want[i] = p[i] != gc[i-1];
      checks++;
      if (s != want || cout != gc[N]) begin
        failures++;
        $display("FAIL p=%h gc=%h: s=%h cout=%0b", p, gc, s, cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
