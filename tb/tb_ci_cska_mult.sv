// tb_ci_cska_mult: exhaustive self-check of the CI-CSKA array multiplier at
// 8 bits (default, 65536 cases) and 4 bits (256 cases) against a * b.
module tb_ci_cska_mult;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0] a8, b8;  logic [15:0] p8;
  logic [3:0] a4, b4;  logic [7:0]  p4;

  ci_cska_mult          u_dut8 (.a(a8), .b(b8), .p(p8));
  ci_cska_mult #(.W(4)) u_dut4 (.a(a4), .b(b4), .p(p4));

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a8, b8} = 16'(i);
      #1;
      checks++;
      if (p8 !== 16'(a8 * b8)) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 %0d*%0d -> %0d", a8, b8, p8);
      end
    end
    for (int i = 0; i < 256; i++) begin
      {a4, b4} = 8'(i);
      #1;
      checks++;
      if (p4 !== 8'(a4 * b4)) begin
        failures++;
        if (failures < 10) $display("FAIL W=4 %0d*%0d -> %0d", a4, b4, p4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
