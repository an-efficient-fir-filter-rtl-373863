// tb_pg_logic: checks the prefix network against a ripple-carry model
// c_i = G_i | P_i & c_{i-1}, c_0 = G_0, at the default width of 17 positions and at
// 2, 5, 33 and 65 positions, so that odd and even top positions and several row
// counts are covered. Inputs are random (P and G may both be set), plus
// long-propagate corners such as a generate at bit 0 under an all-propagate word.
module tb_pg_logic;
  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [16:0] g17, p17, c17;
  logic [1:0]  g2,  p2,  c2;
  logic [4:0]  g5,  p5,  c5;
  logic [32:0] g33, p33, c33;
  logic [64:0] g65, p65, c65;

  pg_logic dut17 (.g(g17), .p(p17), .gc(c17));
  pg_logic #(.W(2))  dut2  (.g(g2),  .p(p2),  .gc(c2));
  pg_logic #(.W(5))  dut5  (.g(g5),  .p(p5),  .gc(c5));
  pg_logic #(.W(33)) dut33 (.g(g33), .p(p33), .gc(c33));
  pg_logic #(.W(65)) dut65 (.g(g65), .p(p65), .gc(c65));

  function automatic logic [64:0] ripple(logic [64:0] g, logic [64:0] p, int w);
    logic [64:0] c = '0;
    c[0] = g[0];
    for (int i = 1; i < w; i++) c[i] = g[i] | (p[i] & c[i-1]);
    return c;
  endfunction

  task automatic compare(logic [64:0] got, logic [64:0] want, int w);
    logic [64:0] mask = (w == 65) ? '1 : ((65'(1) << w) - 65'(1));
    checks++;
    if ((got & mask) != (want & mask)) begin
      failures++;
      $display("FAIL W=%0d got %h want %h", w, got & mask, want & mask);
    end
  endtask

  task automatic apply(logic [64:0] g, logic [64:0] p);
    g17 = g[16:0]; p17 = p[16:0];
    g2  = g[1:0];  p2  = p[1:0];
    g5  = g[4:0];  p5  = p[4:0];
    g33 = g[32:0]; p33 = p[32:0];
    g65 = g;       p65 = p;
    #1;
    compare(65'(c17), ripple(65'(g17), 65'(p17), 17), 17);
    compare(65'(c2),  ripple(65'(g2),  65'(p2),  2),  2);
    compare(65'(c5),  ripple(65'(g5),  65'(p5),  5),  5);
    compare(65'(c33), ripple(65'(g33), 65'(p33), 33), 33);
    compare(c65,      ripple(g65,      p65,      65), 65);
  endtask

  initial begin
    apply(65'(1), '1);                 // carry from bit 0 through every position
    apply(65'(1), {64'(-1), 1'b0});
    apply('0, '1);
    apply('1, '0);
    for (int s = 0; s < 65; s++)        // single generate, propagate above it
      apply(65'(1) << s, '1);
    for (int t = 0; t < 3000; t++)
      apply({1'($urandom), $urandom, $urandom}, {1'($urandom), $urandom | $urandom, $urandom | $urandom});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
