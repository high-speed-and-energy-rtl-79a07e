// ci_cska_adder: W-bit Concatenation Incrementation Carry Skip Adder (CI-CSKA).
//
// The operands are cut into stages of STAGE_W bits (the last stage takes what
// is left). Stage 0 is a plain ripple carry adder fed with the real carry-in.
// Every other stage j has
//   * a ripple carry adder with carry-in 0 ("concatenation"): all stages add
//     at the same time, giving an intermediate sum and a carry C_j;
//   * skip logic forming the stage carry c_j = C_j | (&intermediate & c_{j-1});
//   * an incrementation block (half adders) adding c_{j-1} to the
//     intermediate sum, which gives the stage's final sum bits.
// The skip gates alternate between AND-OR-INVERT (odd stages, inverted carry
// out) and OR-AND-INVERT (even stages, true carry out), so the carry chain
// holds only one compound gate per stage. Where the carry travels inverted,
// an inverter restores it for the incrementer and for cout. The critical path
// is: first ripple adder, the skip gates, the last incrementer.
//
// The stage structure and the AOI/OAI alternation follow the described
// CI-CSKA; the fixed 2-bit stage size is this design's own choice.
// Interface: a, b (W bits), cin in; sum (W bits), cout out. Combinational.
module ci_cska_adder
  import ci_cska_pkg::*;
#(
  parameter int unsigned W       = 8,
  parameter int unsigned STAGE_W = CSKA_STAGE_W
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);
  localparam int unsigned NST = num_stages(W, STAGE_W);

  // Carry out of each stage as it travels on the chain, and whether that
  // signal is inverted (stage j >= 1 with an AOI gate gives ~c_j).
  logic [NST-1:0] chain;

  // Stage 0: ripple carry adder with the real carry-in; true carry out.
  localparam int unsigned W0 = (W < STAGE_W) ? W : STAGE_W;
  ci_rca #(.M(W0)) u_rca0 (
    .a   (a[W0-1:0]),
    .b   (b[W0-1:0]),
    .cin (cin),
    .sum (sum[W0-1:0]),
    .cout(chain[0])
  );

  for (genvar j = 1; j < NST; j++) begin : g_stage
    localparam int unsigned LO  = j * STAGE_W;
    localparam int unsigned MJ  = ((W - LO) < STAGE_W) ? (W - LO) : STAGE_W;
    localparam bit          OAI = (j % 2 == 0);      // stage 1 AOI, 2 OAI, ...

    logic [MJ-1:0] s_int;
    logic          c_rca;
    logic          c_prev_true;

    ci_rca #(.M(MJ)) u_rca (
      .a   (a[LO +: MJ]),
      .b   (b[LO +: MJ]),
      .cin (1'b0),
      .sum (s_int),
      .cout(c_rca)
    );

    // The carry of stage j-1 is inverted on the chain exactly when stage j-1
    // used an AOI gate, i.e. when j-1 is odd.
    if ((j - 1) % 2 == 1) begin : g_prev_inv
      assign c_prev_true = ~chain[j-1];
    end else begin : g_prev_true
      assign c_prev_true = chain[j-1];
    end

    // AOI wants the true carry, OAI the inverted one; the polarity on the
    // chain already matches, so the chain feeds the gate directly.
    ci_skip_logic #(.M(MJ), .OAI(OAI)) u_skip (
      .s_int (s_int),
      .c_rca (c_rca),
      .c_prev(chain[j-1]),
      .c_next(chain[j])
    );

    ci_incrementer #(.M(MJ)) u_inc (
      .s_int(s_int),
      .cin  (c_prev_true),
      .sum  (sum[LO +: MJ])
    );
  end

  // The last stage's carry is inverted if that stage used an AOI gate.
  if ((NST - 1) % 2 == 1) begin : g_cout_inv
    assign cout = ~chain[NST-1];
  end else begin : g_cout_true
    assign cout = chain[NST-1];
  end
endmodule
