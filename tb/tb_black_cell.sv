// tb_black_cell: exhaustive check of the black prefix cell against the carry
// behaviour of two adjacent groups: with a carry-in k into the low group, the
// merged group must give the same carry-out as passing k through the low group and
// then the high group, for k = 0 and k = 1. That fixes both G and P.
module tb_black_cell;
  logic g_hi, p_hi, g_lo, p_lo, g, p;
  int checks = 0, failures = 0;

  black_cell dut (.g_hi(g_hi), .p_hi(p_hi), .g_lo(g_lo), .p_lo(p_lo), .g(g), .p(p));

  function automatic logic carry(logic gg, logic pp, logic k);
    if (gg) return 1'b1;
    if (pp) return k;
    return 1'b0;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {g_hi, p_hi, g_lo, p_lo} = 4'(v);
      #1;
      for (int k = 0; k < 2; k++) begin
        checks++;
        if (carry(g, p, 1'(k)) != carry(g_hi, p_hi, carry(g_lo, p_lo, 1'(k)))) begin
          failures++;
          $display("FAIL in=%04b k=%0d got g=%0b p=%0b", v[3:0], k, g, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
