// edge_sample: behavioural model of the input time sampler of one channel.
//
// This is a simulation model, not synthesizable logic. In the FPGA the sampler
// is built from the I/O deserializers (SERDES) of the device: the detector
// signal enters on PADS input pads, each with its own delay, and each pad is
// sampled on both edges of a fast clock and deserialized into a parallel word
// read at the core clock. Interleaving the pads' samples gives one word of
// WORD_W samples per core clock that shows the state of the signal at
// equally spaced instants: a time-sampled image of the event signal, which is
// the basis of the TDC. The real part depends on the FPGA used and is the only
// device-specific block of the system.
//
// The model reproduces that behaviour: with the core clock period CLK_PS,
// sample k of a word (k = PADS*e + p, pad p, fast clock half-period e) is taken
// k*CLK_PS/WORD_W picoseconds after the rising core clock edge that opens the
// sampling period. With the defaults (3 pads, both edges of a 500 MHz clock,
// 250 MHz core clock) that is 12 samples 333 ps apart, a 3 GHz sampling rate.
// The reference design quotes three delayed pads, DDR sampling and about
// 3.3 GHz; the exact fast clock is this model's choice, picked so that a whole
// number of samples fills one core period.
//
// Interface: clk is the core clock, pad the detector signal as seen at the
// pads, word_o the sampled word, bit 0 the earliest sample. Timing: the word
// holding the samples of core period k (between rising edges k and k+1) is
// presented on word_o from rising edge k+1 to rising edge k+2.
`timescale 1ps / 1ps

module edge_sample
  import tdc_pkg::*;
#(
  parameter int unsigned PADS   = 3,
  parameter int unsigned CLK_PS = 4000
) (
  input  logic  clk,
  input  logic  pad,
  output word_t word_o
);

  // samples taken on one pad in one core period
  localparam int unsigned PER_PAD = WORD_W / PADS;

  word_t acc;

  initial begin
    word_o = '0;
    acc    = '0;
  end

  // one process per sampling period: starts at the core clock edge and takes
  // the samples pad by pad and fast clock edge by fast clock edge, in time
  // order
  always @(posedge clk) begin
    word_o <= acc;
    for (int e = 0; e < PER_PAD; e++) begin
      for (int p = 0; p < PADS; p++) begin
        automatic int unsigned k    = PADS * e + p;
        automatic int unsigned t_k  = k * CLK_PS / WORD_W;
        automatic int unsigned t_k1 = (k + 1) * CLK_PS / WORD_W;
        acc[k] <= pad;
        if (k + 1 < WORD_W) #(t_k1 - t_k);
      end
    end
  end

endmodule
