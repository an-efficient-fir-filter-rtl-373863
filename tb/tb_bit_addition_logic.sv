// tb_bit_addition_logic: checks the carry-save row at its default width (16 bits).
// For random and corner operands it checks that S' + 2*cy equals a + b + c and, bit
// by bit, that each column's two outputs count the ones in that column.
module tb_bit_addition_logic;
  localparam int N = 16;
  logic [N-1:0] a, b, c, s_f, cy;
  int checks = 0, failures = 0;

  bit_addition_logic #(.N(N)) dut (.a(a), .b(b), .c(c), .s_f(s_f), .cy(cy));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    logic [N+1:0] total, csum;
    int bad_cols = 0;
    #1;
    total = (N+2)'(a) + (N+2)'(b) + (N+2)'(c);
    csum  = (N+2)'(s_f) + ((N+2)'(cy) << 1);
    checks++;
    if (total != csum) begin
      failures++;
      $display("FAIL a=%h b=%h c=%h: S'=%h cy=%h", a, b, c, s_f, cy);
    end
    for (int i = 0; i < N; i++)
      if ({cy[i], s_f[i]} != 2'(int'(a[i]) + int'(b[i]) + int'(c[i]))) bad_cols++;
    checks++;
    if (bad_cols != 0) begin
      failures++;
      $display("FAIL %0d columns wrong for a=%h b=%h c=%h", bad_cols, a, b, c);
    end
  endtask

  initial begin
    a = '0; b = '0; c = '0; check();
    a = '1; b = '1; c = '1; check();
    a = '1; b = '0; c = '1; check();
    for (int t = 0; t < 2000; t++) begin
      a = N'($urandom); b = N'($urandom); c = N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
