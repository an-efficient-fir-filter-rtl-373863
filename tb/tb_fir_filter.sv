// tb_fir_filter: end-to-end test of the 9-tap filter at its default sizes.
// A reference model keeps its own copy of the last eight samples and computes
// y[n] = sum b_k x[n-k] with integer arithmetic; yn is compared with it in every
// cycle, just before the rising edge that shifts the delay line. Phases:
//   1. step input: b = 1..9, x = 10 held; the output must climb through
//      10, 30, ..., 210, 280, 360, 450 and reach 450 exactly eight edges after the
//      first sample (the delay line is then full);
//   2. impulse: a single 1 must return the coefficients one per cycle;
//   3. ramp x = 0..8 after a reset;
//   4. full scale (255 everywhere) for the largest output, which needs the
//      carry-out of the last adder;
//   5. random samples and coefficients with resets at random times.
// It also counts how often each mechanism occurred (reset clearing history, full
// delay line, first-level and final adder carry-outs) and fails if one never did.
module tb_fir_filter;
  import fir_pkg::*;

  logic    clk = 1'b0, rst;
  sample_t xn;
  coef_t   b [TAPS];
  acc_t    yn;

  int checks = 0, failures = 0;
  int n_reset_clear = 0, n_full_line = 0, n_l1_carry = 0, n_out_carry = 0;

  fir_filter dut (.clk(clk), .rst(rst), .xn(xn), .b(b), .yn(yn));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference history: hist[k] = x[n-k]; hist[0] is the sample being presented.
  int unsigned hist [TAPS];

  function automatic int unsigned model_y();
    int unsigned acc = 0;
    for (int k = 0; k < TAPS; k++) acc += hist[k] * int'(b[k]);
    return acc;
  endfunction

  // Present xn (and rst) for one cycle, check yn, then take the clock edge.
  task automatic step(sample_t x, logic r, output int unsigned y_seen);
    int unsigned want;
    bit nonzero_hist;
    xn = x; rst = r;
    hist[0] = 32'(x);
    #1;
    want = model_y();
    y_seen = 32'(yn);
    checks++;
    if (yn != OUT_W'(want)) begin
      failures++;
      if (failures < 20) $display("FAIL %0t: x=%0d got %0d want %0d", $time, x, yn, want);
    end
    if (yn[OUT_W-1]) n_out_carry++;
    if (dut.g_l1[0].co || dut.g_l1[1].co || dut.g_l1[2].co) n_l1_carry++;
    if (hist[TAPS-1] != 0) n_full_line++;
    @(posedge clk);
    if (r) begin
      nonzero_hist = 0;
      for (int k = 1; k < TAPS; k++) begin
        if (hist[k] != 0) nonzero_hist = 1;
        hist[k] = 0;
      end
      if (nonzero_hist) n_reset_clear++;
    end else begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    end
    #1;
  endtask

  task automatic do_reset();
    int unsigned y;
    step('0, 1'b1, y);
  endtask

  initial begin
    int unsigned y;
    int unsigned seq [$];
    int first_450;

    // Start from a random-valued delay line (the simulator randomises registers);
    // the model does not know it, so hold reset before checking anything.
    xn = '0; rst = 1'b1;
    for (int k = 0; k < TAPS; k++) b[k] = '0;
    for (int k = 0; k < TAPS; k++) hist[k] = 0;
    @(posedge clk); #1;

    // 1. Step input, coefficients 1..9, input 10.
    for (int k = 0; k < TAPS; k++) b[k] = coef_t'(k + 1);
    do_reset();
    first_450 = -1;
    for (int t = 0; t < 12; t++) begin
      step(8'd10, 1'b0, y);
      seq.push_back(y);
      if (y == 450 && first_450 < 0) first_450 = t;
    end
    checks++;
    if (!(seq[5] == 210 && seq[6] == 280 && seq[7] == 360 && seq[8] == 450)) begin
      failures++;
      $display("FAIL step response %0d %0d %0d %0d", seq[5], seq[6], seq[7], seq[8]);
    end
    checks++;
    if (first_450 != TAPS - 1) begin
      failures++;
      $display("FAIL step response settled after %0d edges, expected %0d", first_450, TAPS - 1);
    end

    // 2. Impulse response returns the coefficients.
    for (int k = 0; k < TAPS; k++) b[k] = coef_t'(3 * k + 7);
    do_reset();
    for (int t = 0; t < TAPS + 2; t++) begin
      step((t == 0) ? 8'd1 : 8'd0, 1'b0, y);
      checks++;
      if (y != ((t < TAPS) ? 32'(b[t]) : 0)) begin
        failures++;
        $display("FAIL impulse response tap %0d: %0d", t, y);
      end
    end

    // 3. Inputs 0..8 after a reset, coefficients 1..9.
    for (int k = 0; k < TAPS; k++) b[k] = coef_t'(k + 1);
    for (int t = 0; t < 3; t++) step(8'(200 + t), 1'b0, y);
    do_reset();
    for (int t = 0; t < TAPS; t++) step(8'(t), 1'b0, y);

    // 4. Full scale.
    for (int k = 0; k < TAPS; k++) b[k] = '1;
    for (int t = 0; t < TAPS + 1; t++) step('1, 1'b0, y);
    checks++;
    if (y != 9 * 255 * 255) begin
      failures++;
      $display("FAIL full scale output %0d", y);
    end

    // 5. Random traffic with occasional resets.
    for (int t = 0; t < 3000; t++) begin
      if (t % 250 == 0)
        for (int k = 0; k < TAPS; k++) b[k] = coef_t'($urandom);
      step(sample_t'($urandom), ($urandom % 61) == 0, y);
    end

    // Every mechanism must have happened.
    checks++;
    if (n_reset_clear == 0) begin failures++; $display("FAIL reset never cleared history"); end
    checks++;
    if (n_full_line == 0) begin failures++; $display("FAIL delay line never full"); end
    checks++;
    if (n_l1_carry == 0) begin failures++; $display("FAIL no first-level carry-out"); end
    checks++;
    if (n_out_carry == 0) begin failures++; $display("FAIL no final carry-out"); end
    $display("mechanisms: reset_clear=%0d full_line=%0d l1_carry=%0d out_carry=%0d",
             n_reset_clear, n_full_line, n_l1_carry, n_out_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
