// ci_cska_pkg: constants shared by the CI-CSKA adder, multiplier and FIR filter.
//
// The data width and tap count are the ones of the 4-tap, 8-bit filter that is
// the main configuration of this design; the 16-bit output width matches the
// width of the filter output y. The 2-bit stage size of the carry skip adder is
// this design's own choice (no stage size is fixed for the adder).
package ci_cska_pkg;
  localparam int unsigned FIR_TAPS    = 4;   // C0..C3
  localparam int unsigned FIR_DATA_W  = 8;   // x and coefficient width
  localparam int unsigned FIR_Y_W     = 16;  // filter output width (wraps)
  localparam int unsigned CSKA_STAGE_W = 2;  // bits per adder stage (own choice)

  // Number of stages of a W-bit adder cut into stages of S bits; the last
  // stage takes whatever is left.
  function automatic int unsigned num_stages(int unsigned w, int unsigned s);
    return (w + s - 1) / s;
  endfunction
endpackage
