// tb_fir_delay_line: self-check of the sample shift register. Random samples
// are shifted in one per clock; after each edge taps[k] must equal the sample
// presented k+1 edges earlier (a software history array is the reference).
// Reset is applied in the middle of the run and must clear every tap.
module tb_fir_delay_line;
  localparam int TAPS = 4;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic       rst;
  logic [7:0] x;
  logic [7:0] taps [TAPS];
  logic [7:0] hist [TAPS];

  fir_delay_line u_dut (.clk(clk), .rst(rst), .x(x), .taps(taps));

  task automatic compare();
    for (int k = 0; k < TAPS; k++) begin
      checks++;
      if (taps[k] !== hist[k]) begin
        failures++;
        $display("FAIL tap %0d = %0d, expected %0d", k, taps[k], hist[k]);
      end
    end
  endtask

  initial begin
    rst = 1'b1; x = '0;
    @(posedge clk); #1;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    compare();
    rst = 1'b0;
    for (int n = 0; n < 200; n++) begin
      x = 8'($urandom);
      if (n == 100) rst = 1'b1;
      @(posedge clk); #1;
      if (rst) begin
        for (int k = 0; k < TAPS; k++) hist[k] = '0;
      end else begin
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x;
      end
      rst = 1'b0;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
