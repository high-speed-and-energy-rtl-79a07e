// ci_skip_logic: carry skip logic of one CI-CSKA stage, as a compound gate.
//
// The carry out of stage j is
//     c_j = C_j | (P_j & c_{j-1})
// where C_j is the carry of the stage's ripple carry adder (added with
// carry-in 0), P_j the AND of the stage's intermediate sum bits (the stage
// passes an incoming carry all the way through only if those bits are all 1)
// and c_{j-1} the carry of the previous stage. C_j and P_j cannot both be 1.
//
// Consecutive stages alternate between two inverting gates so that no extra
// inverter sits on the carry chain:
//   OAI = 0 : AND-OR-INVERT.  c_prev is the true carry, c_next = ~c_j.
//   OAI = 1 : OR-AND-INVERT.  c_prev is the inverted carry ~c_{j-1}, and the
//             gate, fed with ~P_j and ~C_j, gives c_next = c_j (true).
// The AND tree forming P_j and the inversions of P_j and C_j are off the
// carry chain. Purely combinational.
module ci_skip_logic #(
  parameter int unsigned M   = 2,
  parameter bit          OAI = 1'b0
) (
  input  logic [M-1:0] s_int,
  input  logic         c_rca,
  input  logic         c_prev,
  output logic         c_next
);
  logic p;
  assign p = &s_int;

  if (!OAI) begin : g_aoi
    assign c_next = ~((p & c_prev) | c_rca);
  end else begin : g_oai
    assign c_next = ~((~p | c_prev) & ~c_rca);
  end
endmodule
