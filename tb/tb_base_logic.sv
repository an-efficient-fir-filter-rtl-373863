// tb_base_logic: checks the row of half adders at its default width (16 bits).
// The (G, P) pairs must keep the value of their inputs: sum over positions of
// (2*G_i + P_i) * 2^i equals S' + 2*cy + cin. Each position must also hold a
// half-adder result (G and P never both set), and the top position must carry cy[N-1].
module tb_base_logic;
  localparam int N = 16;
  logic [N-1:0] s_f, cy;
  logic         cin;
  logic [N:0]   g, p;
  int checks = 0, failures = 0;

  base_logic #(.N(N)) dut (.s_f(s_f), .cy(cy), .cin(cin), .g(g), .p(p));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N+2:0] want, got;
    #1;
    want = (N+3)'(s_f) + ((N+3)'(cy) << 1) + (N+3)'(cin);
    got  = (N+3)'(p) + ((N+3)'(g) << 1);
    checks++;
    if (want != got) begin
      failures++;
      $display("FAIL s_f=%h cy=%h cin=%0b: g=%h p=%h", s_f, cy, cin, g, p);
    end
    checks++;
    if ((g & p) != '0) begin
      failures++;
      $display("FAIL g and p both set: g=%h p=%h", g, p);
    end
    checks++;
    if (p[N] != cy[N-1] || g[N] != 1'b0) begin
      failures++;
      $display("FAIL top position: g=%0b p=%0b cy[N-1]=%0b", g[N], p[N], cy[N-1]);
    end
  endtask

  initial begin
    s_f = '0; cy = '0; cin = 1'b1; check();
    s_f = '1; cy = '1; cin = 1'b1; check();
    for (int t = 0; t < 2000; t++) begin
      s_f = N'($urandom); cy = N'($urandom); cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
