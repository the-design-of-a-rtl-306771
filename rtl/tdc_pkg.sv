// tdc_pkg: constants and types shared by the coincidence-trigger blocks.
//
// Time is kept as a coarse part, the value of a 40-bit counter clocked by the
// 250 MHz core clock (4 ns per count), and a fine part, the index of the sample
// inside the parallel word that the input sampler delivers every core clock.
// With twelve samples per 4 ns word the fine step is 333 ps, the "approximately
// 300 ps" resolution of the TDC. The coarse width and clock follow the
// reference design; twelve samples per word (three pads, both clock edges, a
// 500 MHz sampling clock) is this design's choice, the nearest whole number of
// samples per core clock to the quoted 3.3 GHz sampling rate.
//
// Sample index 0 of a word is the earliest sample, index WORD_W-1 the latest.
// Comparing two time stamps is done on the linear value coarse*WORD_W + fine
// (see to_samples), so the fine field never wraps on its own.
`timescale 1ps / 1ps

package tdc_pkg;

  // samples per core-clock word
  localparam int unsigned WORD_W   = 12;
  // coarse counter width (40 bits at 250 MHz)
  localparam int unsigned COARSE_W = 40;
  // fine time field width: enough for 0 .. WORD_W-1
  localparam int unsigned FINE_W   = $clog2(WORD_W);
  // edge counter width
  localparam int unsigned COUNT_W  = 32;
  // width of a time stamp expressed in samples
  localparam int unsigned TSAMP_W  = COARSE_W + FINE_W;

  typedef logic [COARSE_W-1:0] coarse_t;
  typedef logic [FINE_W-1:0]   fine_t;
  typedef logic [WORD_W-1:0]   word_t;
  typedef logic [TSAMP_W-1:0]  tsamp_t;

  // time of occurrence of an edge: coarse counter value and sample index
  typedef struct packed {
    coarse_t coarse;
    fine_t   fine;
  } edge_time_t;

  // time stamp as a number of sample periods since the counter was reset
  function automatic tsamp_t to_samples(edge_time_t t);
    return tsamp_t'(t.coarse) * tsamp_t'(WORD_W) + tsamp_t'(t.fine);
  endfunction

endpackage
