// tb_three_operand_adder: checks {cout, s} = a + b + c + cin at the default 16-bit
// width and at 32, 64 and 128 bits, the widths over which the adder is usually
// compared, plus 2 and 3 bits for the smallest networks. Operands are random, all
// ones (the largest sum, which needs the carry-out) and the 16-bit example
// 1 + 2 + 4 = 7. The reference is the simulator's own wide addition.
module tb_three_operand_adder;
  int checks = 0, failures = 0;
  int cout_seen = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] a, b, c;
  logic         cin;

  logic [16:0]  s16;  logic co16;
  logic [32:0]  s32;  logic co32;
  logic [64:0]  s64;  logic co64;
  logic [128:0] s128; logic co128;
  logic [2:0]   s2;   logic co2;
  logic [3:0]   s3;   logic co3;

  three_operand_adder dut16 (.a(a[15:0]), .b(b[15:0]), .c(c[15:0]), .cin(cin), .s(s16), .cout(co16));
  three_operand_adder #(.N(32))  dut32  (.a(a[31:0]), .b(b[31:0]), .c(c[31:0]), .cin(cin), .s(s32), .cout(co32));
  three_operand_adder #(.N(64))  dut64  (.a(a[63:0]), .b(b[63:0]), .c(c[63:0]), .cin(cin), .s(s64), .cout(co64));
  three_operand_adder #(.N(128)) dut128 (.a(a),       .b(b),       .c(c),       .cin(cin), .s(s128), .cout(co128));
  three_operand_adder #(.N(2))   dut2   (.a(a[1:0]),  .b(b[1:0]),  .c(c[1:0]),  .cin(cin), .s(s2),  .cout(co2));
  three_operand_adder #(.N(3))   dut3   (.a(a[2:0]),  .b(b[2:0]),  .c(c[2:0]),  .cin(cin), .s(s3),  .cout(co3));

  task automatic compare(int n, logic [129:0] got);
    logic [127:0] mask = (n == 128) ? '1 : ((128'(1) << n) - 128'(1));
    logic [129:0] want = 130'(a & mask) + 130'(b & mask) + 130'(c & mask) + 130'(cin);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL N=%0d a=%h b=%h c=%h cin=%0b: got %h want %h", n, a & mask, b & mask,
               c & mask, cin, got, want);
    end
  endtask

  task automatic apply();
    #1;
    compare(16,  130'({co16, s16}));
    compare(32,  130'({co32, s32}));
    compare(64,  130'({co64, s64}));
    compare(128, {co128, s128});
    compare(2,   130'({co2, s2}));
    compare(3,   130'({co3, s3}));
    if (co16 || co32 || co64 || co128) cout_seen++;
  endtask

  initial begin
    // 16-bit example: 1 + 2 + 4 = 7.
    a = 128'd1; b = 128'd2; c = 128'd4; cin = 1'b0;
    #1;
    checks++;
    if ({co16, s16} != 18'd7) begin
      failures++;
      $display("FAIL 1+2+4 gave %0d", {co16, s16});
    end
    apply();
    a = '1; b = '1; c = '1; cin = 1'b1; apply();
    a = '1; b = '0; c = '0; cin = 1'b1; apply();
    a = '1; b = 128'd1; c = '0; cin = 1'b0; apply();
    for (int t = 0; t < 3000; t++) begin
      a = {$urandom, $urandom, $urandom, $urandom};
      b = {$urandom, $urandom, $urandom, $urandom};
      c = {$urandom, $urandom, $urandom, $urandom};
      cin = 1'($urandom);
      apply();
    end
    checks++;
    if (cout_seen == 0) begin
      failures++;
      $display("FAIL carry-out never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
