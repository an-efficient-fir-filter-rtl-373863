// tb_multiplier: exhaustive check of the 8x8 unsigned tap multiplier. The reference
// product is built by shift-and-add over the bits of the coefficient.
module tb_multiplier;
  logic [7:0]  x, beta;
  logic [15:0] y;
  int checks = 0, failures = 0;

  multiplier dut (.x(x), .beta(beta), .y(y));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] want;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        x = 8'(i); beta = 8'(j);
        #1;
        want = '0;
        for (int k = 0; k < 8; k++) if (beta[k]) want += 16'(x) << k;
        checks++;
        if (y != want) begin
          failures++;
          if (failures < 10) $display("FAIL %0d * %0d gave %0d", x, beta, y);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
