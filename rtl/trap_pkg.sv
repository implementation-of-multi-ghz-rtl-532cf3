// trap_pkg: constants shared by the parallel trapezoidal shaper.
//
// The filter works on a sample stream delivered N samples per clock: lane 0
// of a word holds the oldest sample, lane N-1 the newest, so sample index
// n = N*cycle + lane. The defaults below are the 5 GS/s configuration: a
// 14-bit converter read as 16 lanes at 312.5 MHz and 64-bit accumulators.
// The delay ranges and the fixed-point format of the deconvolution constant
// M are this design's own choices.
package trap_pkg;

  // Lanes per clock (5 GS/s / 312.5 MHz).
  parameter int unsigned LANES_DEF   = 16;
  // Converter sample width.
  parameter int unsigned SAMPLE_W_DEF = 14;
  // Accumulator width.
  parameter int unsigned ACC_W_DEF   = 64;
  // Largest programmable rise delay k and flat-top delay l, in samples.
  parameter int unsigned K_MAX_DEF   = 512;
  parameter int unsigned L_MAX_DEF   = 512;
  // Deconvolution constant M: unsigned fixed point, M_FRAC fraction bits.
  parameter int unsigned M_W_DEF     = 32;
  parameter int unsigned M_FRAC_DEF  = 16;

  // Latency in clocks of parallel_acc with the given lane count: one
  // registered level per prefix-sum level plus the feedback adder.
  function automatic int unsigned pacc_latency(int unsigned lanes);
    return $clog2(lanes) + 1;
  endfunction

endpackage
