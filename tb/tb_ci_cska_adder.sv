// tb_ci_cska_adder: self-check of the CI-CSKA adder.
//   * 8-bit default instance: every a, b, cin combination (2^17 cases),
//     including the four sample additions 129+130, 1+130, 225+130, 225+194.
//   * 5-bit instance (stages 2+2+1): exhaustive, checks an uneven last stage.
//   * 16-bit instance: random operands plus all-ones propagate cases, so the
//     carry has to skip across every stage of both gate polarities.
// Expected values are the integer sum a + b + cin.
module tb_ci_cska_adder;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8, b8, s8;     logic ci8, co8;
  logic [4:0]  a5, b5, s5;     logic ci5, co5;
  logic [15:0] a16, b16, s16;  logic ci16, co16;

  ci_cska_adder           u_dut8  (.a(a8),  .b(b8),  .cin(ci8),  .sum(s8),  .cout(co8));
  ci_cska_adder #(.W(5))  u_dut5  (.a(a5),  .b(b5),  .cin(ci5),  .sum(s5),  .cout(co5));
  ci_cska_adder #(.W(16)) u_dut16 (.a(a16), .b(b16), .cin(ci16), .sum(s16), .cout(co16));

  task automatic check16(input logic [15:0] a, input logic [15:0] b, input logic c);
    a16 = a; b16 = b; ci16 = c;
    #1;
    checks++;
    if ({co16, s16} !== 17'(a + b + c)) begin
      failures++;
      $display("FAIL W=16 a=%h b=%h cin=%0d -> %h", a, b, c, {co16, s16});
    end
  endtask

  initial begin
    for (int i = 0; i < (1 << 17); i++) begin
      {ci8, a8, b8} = 17'(i);
      #1;
      checks++;
      if ({co8, s8} !== 9'(a8 + b8 + ci8)) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 a=%0d b=%0d cin=%0d -> %0d", a8, b8, ci8, {co8, s8});
      end
    end
    for (int i = 0; i < (1 << 11); i++) begin
      {ci5, a5, b5} = 11'(i);
      #1;
      checks++;
      if ({co5, s5} !== 6'(a5 + b5 + ci5)) begin
        failures++;
        if (failures < 10) $display("FAIL W=5 a=%0d b=%0d cin=%0d -> %0d", a5, b5, ci5, {co5, s5});
      end
    end
    check16(16'hFFFF, 16'h0000, 1'b1);
    check16(16'hAAAA, 16'h5555, 1'b1);
    check16(16'h00FF, 16'h0001, 1'b0);
    check16(16'h7FFF, 16'h0001, 1'b0);
    for (int i = 0; i < 20000; i++)
      check16(16'($urandom), 16'($urandom), 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
