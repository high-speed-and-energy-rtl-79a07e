// ci_cska_mult: unsigned W x W array multiplier built on CI-CSKA adders.
//
// Partial product row i is a & {W{b[i]}} (AND gates). Rows are accumulated
// as in a classic array multiplier: the running sum is shifted by one bit per
// row, its low bit becomes a final product bit, and its upper W bits are added
// to the next row by a W-bit CI-CSKA adder whose carry-out becomes the new top
// bit. W-1 adders in all; the last adder's sum and carry form the top W+1
// product bits. Using the CI-CSKA for every row adder follows the design; the
// row-by-row (array) arrangement is this design's own choice.
// Interface: a, b (W bits) in, p (2W bits) out. Purely combinational.
module ci_cska_mult
  import ci_cska_pkg::*;
#(
  parameter int unsigned W       = FIR_DATA_W,
  parameter int unsigned STAGE_W = CSKA_STAGE_W
) (
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  output logic [2*W-1:0] p
);
  // acc[i] is the W+1-bit running sum after row i; its bit 0 is product bit i.
  logic [W:0] acc [W];

  assign acc[0] = {1'b0, a & {W{b[0]}}};
  assign p[0]   = acc[0][0];

  for (genvar i = 1; i < W; i++) begin : g_row
    logic [W-1:0] pp;
    assign pp = a & {W{b[i]}};

    ci_cska_adder #(.W(W), .STAGE_W(STAGE_W)) u_add (
      .a   (acc[i-1][W:1]),
      .b   (pp),
      .cin (1'b0),
      .sum (acc[i][W-1:0]),
      .cout(acc[i][W])
    );
    assign p[i] = acc[i][0];
  end

  assign p[2*W-1:W] = acc[W-1][W:1];
endmodule
