// tb_ci_incrementer: exhaustive self-check of the half-adder incrementation
// block for M = 2 (default) and M = 4: sum must equal (s_int + cin) mod 2^M.
module tb_ci_incrementer;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] s2, o2;  logic c2;
  logic [3:0] s4, o4;  logic c4;

  ci_incrementer          u_dut2 (.s_int(s2), .cin(c2), .sum(o2));
  ci_incrementer #(.M(4)) u_dut4 (.s_int(s4), .cin(c4), .sum(o4));

  initial begin
    for (int i = 0; i < 8; i++) begin
      {c2, s2} = 3'(i);
      #1;
      checks++;
      if (o2 !== 2'(s2 + c2)) begin
        failures++;
        $display("FAIL M=2 s=%0d c=%0d -> %0d", s2, c2, o2);
      end
    end
    for (int i = 0; i < 32; i++) begin
      {c4, s4} = 5'(i);
      #1;
      checks++;
      if (o4 !== 4'(s4 + c4)) begin
        failures++;
        $display("FAIL M=4 s=%0d c=%0d -> %0d", s4, c4, o4);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
