// tb_unit_delay: drives random samples into one 8-bit delay cell and checks that
// after each rising edge the output equals the sample presented before that edge,
// and that a synchronous reset clears it, from any starting value.
module tb_unit_delay;
  logic       clk = 1'b0, rst;
  logic [7:0] x, y, prev;
  int checks = 0, failures = 0;

  unit_delay dut (.clk(clk), .rst(rst), .x(x), .y(y));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b0;
    x = 8'hA5;
    @(posedge clk); #1;
    for (int t = 0; t < 1000; t++) begin
      rst = (t % 97 == 50);
      prev = x;
      @(posedge clk); #1;
      checks++;
      if (y != (rst ? 8'h00 : prev)) begin
        failures++;
        $display("FAIL t=%0d rst=%0b got %h want %h", t, rst, y, rst ? 8'h00 : prev);
      end
      x = 8'($urandom);
      if (t % 97 == 49) x = 8'hFF;   // reset must clear a non-zero value
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
