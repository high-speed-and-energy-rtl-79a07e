// tb_ci_skip_logic: exhaustive self-check of both forms of the skip gate.
// The expected carry is c = C | (&s_int & c_prev). The AOI form takes the
// true previous carry and must give ~c; the OAI form takes the inverted
// previous carry and must give c.
module tb_ci_skip_logic;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] s;
  logic       c_rca, c_prev, aoi_out, oai_out, expect_c;

  ci_skip_logic                  u_aoi (.s_int(s), .c_rca(c_rca), .c_prev(c_prev),  .c_next(aoi_out));
  ci_skip_logic #(.OAI(1'b1))    u_oai (.s_int(s), .c_rca(c_rca), .c_prev(~c_prev), .c_next(oai_out));

  initial begin
    for (int i = 0; i < 16; i++) begin
      {s, c_rca, c_prev} = 4'(i);
      #1;
      expect_c = c_rca | ((s == 2'b11) & c_prev);
      checks += 2;
      if (aoi_out !== ~expect_c) begin
        failures++;
        $display("FAIL AOI s=%b C=%b cp=%b -> %b", s, c_rca, c_prev, aoi_out);
      end
      if (oai_out !== expect_c) begin
        failures++;
        $display("FAIL OAI s=%b C=%b cp=%b -> %b", s, c_rca, c_prev, oai_out);
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
