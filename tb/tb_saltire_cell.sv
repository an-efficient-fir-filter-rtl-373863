// tb_saltire_cell: exhaustive check of the base-logic half adder. For all four
// inputs, 2*g + p must equal s_f + cy_prev, and g and p are never both set.
module tb_saltire_cell;
  logic s_f, cy_prev, g, p;
  int checks = 0, failures = 0;

  saltire_cell dut (.s_f(s_f), .cy_prev(cy_prev), .g(g), .p(p));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {s_f, cy_prev} = 2'(v);
      #1;
      checks++;
      if ({g, p} != 2'(int'(s_f) + int'(cy_prev))) begin
        failures++;
        $display("FAIL s_f=%0b cy_prev=%0b got g=%0b p=%0b", s_f, cy_prev, g, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
