// ci_incrementer: incrementation block of a CI-CSKA stage.
//
// Adds the one-bit carry of the previous stage to the stage's intermediate sum
// (computed with carry-in 0) through a chain of M half adders: bit i receives
// the carry of bit i-1. The chain's last carry is not brought out, because the
// stage carry is formed by the skip logic instead. Purely combinational.
// Interface: s_int (M bits) and cin in, sum (M bits) out.
module ci_incrementer #(
  parameter int unsigned M = 2
) (
  input  logic [M-1:0] s_int,
  input  logic         cin,
  output logic [M-1:0] sum
);
  logic [M:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < M; i++) begin : g_ha
    half_adder u_ha (
      .a   (s_int[i]),
      .b   (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end
  // c[M] is the half-adder chain's own overflow; the skip logic computes the
  // stage carry-out in parallel, so this bit is intentionally unused.
  logic unused_carry;
  assign unused_carry = c[M];
endmodule
