// tb_full_adder_cell: exhaustive check of the full adder cell. For all eight input
// combinations the two outputs, read as the number 2*cy + s_f, must equal the count of
// ones among a, b, c. A watchdog ends the run if it hangs.
module tb_full_adder_cell;
  logic a, b, c, s_f, cy;
  int checks = 0, failures = 0;

  full_adder_cell dut (.a(a), .b(b), .c(c), .s_f(s_f), .cy(cy));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({cy, s_f} != 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%0b b=%0b c=%0b got cy=%0b s=%0b", a, b, c, cy, s_f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
