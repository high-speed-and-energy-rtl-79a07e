// half_adder: one-bit half adder, the cell of the incrementation block.
// sum = a ^ b, cout = a & b. Purely combinational.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic cout
);
  always_comb begin
    sum  = a ^ b;
    cout = a & b;
  end
endmodule
