// fir_delay_line: sample delay line of the FIR filter.
//
// A shift register of TAPS words of DATA_W bits, clocked once per sample:
// on each rising clock edge taps[0] takes x and taps[k] takes taps[k-1], so
// after the edge that loads sample x[n], taps[k] holds x[n-k]. A synchronous,
// active-high reset clears every word. The shift register follows the
// described unit-delay chain; the reset behaviour is this design's choice.
// Interface: clk, rst, x in; taps (TAPS x DATA_W, registered) out.
module fir_delay_line
  import ci_cska_pkg::*;
#(
  parameter int unsigned TAPS   = FIR_TAPS,
  parameter int unsigned DATA_W = FIR_DATA_W
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [DATA_W-1:0] x,
  output logic [DATA_W-1:0] taps [TAPS]
);
  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < TAPS; k++) taps[k] <= '0;
    end else begin
      taps[0] <= x;
      for (int k = 1; k < TAPS; k++) taps[k] <= taps[k-1];
    end
  end
endmodule
