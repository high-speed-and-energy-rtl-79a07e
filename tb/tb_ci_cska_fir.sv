// tb_ci_cska_fir: end-to-end self-check of the FIR filter at its default
// parameters (4 taps, 8-bit samples and coefficients, 16-bit output).
//
// A software model keeps the last four samples and computes
// y = sum C_k * x[n-k] mod 2^16. The run has four phases:
//   1. impulse: a single 1 sample must bring out C0, C1, C2, C3 on
//      successive clocks (checks the tap order and the one-clock latency);
//   2. the sample stream x = 16, 17, 17 with C = 1, 2, 3, 4;
//   3. random samples and random coefficients, small and full-range, so the
//      sum both stays in range and wraps past 2^16 (overflow);
//   4. reset in mid-stream, which must clear the delay line (y = 0).
// The testbench counts how often the output wrapped, how often reset was
// applied, and how often a carry skipped across a whole adder stage; a
// mechanism that never happened counts as a failure.
module tb_ci_cska_fir;
  localparam int TAPS = 4;
  int checks = 0, failures = 0;
  int n_wrap = 0, n_reset = 0, n_skip = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic [7:0]  x;
  logic [7:0]  c [TAPS];
  logic [15:0] y;
  logic [7:0]  hist [TAPS];

  ci_cska_fir u_dut (.clk(clk), .rst(rst), .x(x), .c(c), .y(y));

  // Skip events: carry of the previous stage passing through all of stage 1
  // of the last output adder (its intermediate sum all ones, carry in set).
  always @(negedge clk)
    if (&u_dut.g_sum[TAPS-1].u_add.g_stage[1].s_int && u_dut.g_sum[TAPS-1].u_add.g_stage[1].c_prev_true)
      n_skip++;

  function automatic logic [15:0] model_y();
    int unsigned acc = 0;
    for (int k = 0; k < TAPS; k++) acc += int'(c[k]) * int'(hist[k]);
    if (acc > 65535) n_wrap++;
    return 16'(acc);
  endfunction

  // Present x, clock it in, update the model and compare.
  task automatic step(input logic [7:0] xv, input logic r);
    logic [15:0] exp_y;
    x = xv; rst = r;
    @(posedge clk); #1;
    if (r) begin
      for (int k = 0; k < TAPS; k++) hist[k] = '0;
      n_reset++;
    end else begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = xv;
    end
    exp_y = model_y();
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", xv, y, exp_y);
    end
    rst = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) c[k] = 8'(k + 1);
    step(8'd0, 1'b1);
    // 1. impulse response: y must be C0, C1, C2, C3, then 0
    step(8'd1, 1'b0);
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (y !== 16'(c[k])) begin
        failures++;
        $display("FAIL impulse tap %0d: y=%0d expected %0d", k, y, c[k]);
      end
      step(8'd0, 1'b0);
    end
    checks++;
    if (y !== 16'd0) begin
      failures++;
      $display("FAIL impulse tail y=%0d", y);
    end
    // 2. sample stream 16, 17, 17 with C = 1, 2, 3, 4
    step(8'd16, 1'b0);
    step(8'd17, 1'b0);
    step(8'd17, 1'b0);
    checks++;
    if (y !== 16'd99) begin   // 1*17 + 2*17 + 3*16
      failures++;
      $display("FAIL stream y=%0d expected 99", y);
    end
    // 3. random streams: small coefficients, then full range (overflows)
    for (int blk = 0; blk < 40; blk++) begin
      for (int k = 0; k < TAPS; k++)
        c[k] = (blk % 2 == 0) ? 8'($urandom_range(0, 15)) : 8'($urandom);
      for (int n = 0; n < 50; n++) begin
        // 4. reset now and then in mid-stream
        step(8'($urandom), (n == 25 && blk % 8 == 3));
      end
    end
    if (n_wrap == 0)  begin failures++; $display("FAIL output never wrapped"); end
    if (n_reset < 2)  begin failures++; $display("FAIL mid-stream reset not exercised"); end
    if (n_skip == 0)  begin failures++; $display("FAIL carry never skipped a stage"); end
    $display("wraps=%0d resets=%0d skips=%0d", n_wrap, n_reset, n_skip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
