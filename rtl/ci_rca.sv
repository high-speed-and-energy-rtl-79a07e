// ci_rca: M-bit ripple carry adder, the adding block of each CI-CSKA stage.
//
// A chain of M full adders; the carry ripples from bit 0 to bit M-1. In the
// first stage of the adder it receives the real carry-in; in every later stage
// its carry-in is tied to 0, so all stages add at the same time and their
// outputs are "intermediate" sums that the incrementation block corrects.
// Interface: a, b, cin in; sum (M bits) and cout out. Purely combinational.
module ci_rca #(
  parameter int unsigned M = 2
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  input  logic         cin,
  output logic [M-1:0] sum,
  output logic         cout
);
  logic [M:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < M; i++) begin : g_fa
    full_adder u_fa (
      .a   (a[i]),
      .b   (b[i]),
      .cin (c[i]),
      .sum (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[M];
endmodule
