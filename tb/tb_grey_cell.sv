// tb_grey_cell: exhaustive check of the grey prefix cell. Its output must be the
// carry out of the high group when the carry into it is g_lo.
module tb_grey_cell;
  logic g_hi, p_hi, g_lo, g;
  int checks = 0, failures = 0;

  grey_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_g;
    for (int v = 0; v < 8; v++) begin
      {g_hi, p_hi, g_lo} = 3'(v);
      #1;
      expect_g = g_hi ? 1'b1 : (p_hi ? g_lo : 1'b0);
      checks++;
      if (g != expect_g) begin
        failures++;
        $display("FAIL in=%03b got g=%0b", v[2:0], g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
