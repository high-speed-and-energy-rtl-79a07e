// ci_cska_fir: direct-form FIR filter built from CI-CSKA arithmetic.
//
//     y[n] = C0*x[n] + C1*x[n-1] + ... + C(TAPS-1)*x[n-TAPS+1]   (mod 2^Y_W)
//
// A delay line registers one sample per clock. Each tap's sample is
// multiplied by its coefficient in a CI-CSKA array multiplier, and the TAPS
// products are summed by a chain of TAPS-1 two-input Y_W-bit CI-CSKA adders.
// Samples and coefficients are unsigned. The multiply/add path is
// combinational from the delay-line registers, so y shows the filter output
// for sample x[n] one clock after x[n] is presented (right after the edge
// that loads it). Reset (synchronous, active high) clears the delay line,
// after which y is 0. The sum wraps modulo 2^Y_W: with the default 16-bit
// output and 8-bit operands, large inputs overflow (full precision would need
// 2*DATA_W + clog2(TAPS) bits; set Y_W to that to avoid it).
//
// The tap structure, operand widths, the 16-bit output and the coefficient
// ports C0..C3 follow the described filter; the unsigned format, the reset
// and the wrap-around are this design's own choices.
module ci_cska_fir
  import ci_cska_pkg::*;
#(
  parameter int unsigned TAPS    = FIR_TAPS,
  parameter int unsigned DATA_W  = FIR_DATA_W,
  parameter int unsigned Y_W     = FIR_Y_W,
  parameter int unsigned STAGE_W = CSKA_STAGE_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] x,
  input  logic [DATA_W-1:0] c [TAPS],
  output logic [Y_W-1:0]    y
);
  localparam int unsigned P_W = 2 * DATA_W;

  logic [DATA_W-1:0] taps [TAPS];
  logic [Y_W-1:0]    prod [TAPS];   // products, zero-extended or cut to Y_W
  logic [Y_W-1:0]    psum [TAPS];   // psum[k] = prod[0] + ... + prod[k]

  fir_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) u_delay (
    .clk (clk),
    .rst (rst),
    .x   (x),
    .taps(taps)
  );

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    logic [P_W-1:0] p;
    ci_cska_mult #(.W(DATA_W), .STAGE_W(STAGE_W)) u_mult (
      .a(taps[k]),
      .b(c[k]),
      .p(p)
    );
    if (Y_W >= P_W) begin : g_ext
      assign prod[k] = Y_W'(p);
    end else begin : g_cut
      assign prod[k] = p[Y_W-1:0];
      logic unused_hi;
      assign unused_hi = ^p[P_W-1:Y_W];
    end
  end

  assign psum[0] = prod[0];
  for (genvar k = 1; k < TAPS; k++) begin : g_sum
    logic unused_cout;   // the sum wraps modulo 2^Y_W
    ci_cska_adder #(.W(Y_W), .STAGE_W(STAGE_W)) u_add (
      .a   (psum[k-1]),
      .b   (prod[k]),
      .cin (1'b0),
      .sum (psum[k]),
      .cout(unused_cout)
    );
  end

  assign y = psum[TAPS-1];
endmodule
