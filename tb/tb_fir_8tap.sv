// tb_fir_8tap: runs the FIR filter in its 8-tap configuration (TAPS = 8,
// 8-bit samples and coefficients, 16-bit output) on an impulse and on a
// random sample stream with random coefficients, against the software model
// y = sum_{k<8} C_k * x[n-k] mod 2^16.
module tb_fir_8tap;
  localparam int TAPS = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst;
  logic [7:0]  x;
  logic [7:0]  c [TAPS];
  logic [15:0] y;
  logic [7:0]  hist [TAPS];

  ci_cska_fir #(.TAPS(TAPS)) u_dut (.clk(clk), .rst(rst), .x(x), .c(c), .y(y));

  task automatic step(input logic [7:0] xv, input logic r);
    int unsigned acc;
    x = xv; rst = r;
    @(posedge clk); #1;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = r ? '0 : hist[k-1];
    hist[0] = r ? '0 : xv;
    acc = 0;
    for (int k = 0; k < TAPS; k++) acc += int'(c[k]) * int'(hist[k]);
    checks++;
    if (y !== 16'(acc)) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d y=%0d expected %0d", xv, y, 16'(acc));
    end
    rst = 1'b0;
  endtask

  initial begin
    for (int k = 0; k < TAPS; k++) c[k] = 8'(10 * k + 3);
    step(8'd0, 1'b1);
    step(8'd1, 1'b0);
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (y !== 16'(c[k])) begin
        failures++;
        $display("FAIL impulse tap %0d: y=%0d expected %0d", k, y, c[k]);
      end
      step(8'd0, 1'b0);
    end
    for (int blk = 0; blk < 20; blk++) begin
      for (int k = 0; k < TAPS; k++) c[k] = 8'($urandom);
      for (int n = 0; n < 50; n++) step(8'($urandom), 1'b0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
