// tb_ci_rca: exhaustive self-check of the ripple carry adder block.
// Every a, b, cin combination of a 2-bit (default) and a 5-bit instance is
// compared with the integer sum a + b + cin. A watchdog ends the run if it
// stalls.
module tb_ci_rca;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] a2, b2, s2;  logic ci2, co2;
  logic [4:0] a5, b5, s5;  logic ci5, co5;

  ci_rca                u_dut2 (.a(a2), .b(b2), .cin(ci2), .sum(s2), .cout(co2));
  ci_rca #(.M(5))       u_dut5 (.a(a5), .b(b5), .cin(ci5), .sum(s5), .cout(co5));

  initial begin
    for (int i = 0; i < 32; i++) begin
      {ci2, a2, b2} = 5'(i);
      #1;
      checks++;
      if ({co2, s2} !== 3'(a2 + b2 + ci2)) begin
        failures++;
        $display("FAIL M=2 a=%0d b=%0d cin=%0d -> %0d", a2, b2, ci2, {co2, s2});
      end
    end
    for (int i = 0; i < 2048; i++) begin
      {ci5, a5, b5} = 11'(i);
      #1;
      checks++;
      if ({co5, s5} !== 6'(a5 + b5 + ci5)) begin
        failures++;
        $display("FAIL M=5 a=%0d b=%0d cin=%0d -> %0d", a5, b5, ci5, {co5, s5});
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
