// ns_coinc_channel: north-south coincidence channel of the RPC PET trigger.
//
// Two detector plates face each other (north and south). A gamma pair from
// the same annihilation hits both within a few hundred picoseconds, while
// unrelated (random) hits are spread in time. The channel time-stamps every
// rising edge of the two plate signals to about 333 ps and raises
// ns_c_trigger when a north and a south edge fall inside a narrow time
// window, which lets the data acquisition keep only the data of real pairs.
//
// Structure, per the reference architecture:
//   n_es_pad -> edge_sample -> edge_process --n_e_*--+
//                                 ^ coarse time      +-> edge_coinc -> ns_c_trigger
//   s_es_pad -> edge_sample -> edge_process --s_e_*--+
//                                 ^
//                edge_time (40-bit coarse counter, shared)
//
// edge_sample is the device-dependent sampler (a behavioural model here); the
// other blocks are plain synchronous logic on the 250 MHz core clock.
// PROGRAMMABLE selects the run-time programmable architecture (filter width
// and window from the filter_w and window inputs) or the hard-wired one
// (FILTER_W and WINDOW parameters).
//
// Outputs per channel: e_trigger (one-clock pulse per word with an accepted
// edge, usable as the channel's acquisition trigger), e_time (40-bit coarse
// plus 4-bit fine time of the first edge in that word) and e_counter (32-bit
// count of accepted edges since reset).
//
// Timing: an edge in core period k appears on the channel outputs after rising
// edge k+3 and, if it completes a coincidence, on ns_c_trigger one clock later.
// Reset is synchronous and active high; it clears counters, held edges and the
// coarse time.
`timescale 1ps / 1ps

module ns_coinc_channel
  import tdc_pkg::*;
#(
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter int unsigned FILTER_W     = 1,
  parameter int unsigned WIN_W        = 8,
  parameter int unsigned WINDOW       = 1
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               n_es_pad,
  input  logic               s_es_pad,
  input  fine_t              filter_w,
  input  logic [WIN_W-1:0]   window,
  output logic               n_e_trigger,
  output edge_time_t         n_e_time,
  output logic [COUNT_W-1:0] n_e_counter,
  output logic               s_e_trigger,
  output edge_time_t         s_e_time,
  output logic [COUNT_W-1:0] s_e_counter,
  output logic               ns_c_trigger
);

  coarse_t coarse;
  word_t   n_word, s_word;

  edge_time u_edge_time (
    .clk      (clk),
    .rst      (rst),
    .coarse_o (coarse)
  );

  edge_sample u_n_sample (
    .clk    (clk),
    .pad    (n_es_pad),
    .word_o (n_word)
  );

  edge_sample u_s_sample (
    .clk    (clk),
    .pad    (s_es_pad),
    .word_o (s_word)
  );

  edge_process #(
    .PROGRAMMABLE (PROGRAMMABLE),
    .FILTER_W     (FILTER_W)
  ) u_n_process (
    .clk         (clk),
    .rst         (rst),
    .word_i      (n_word),
    .coarse_i    (coarse),
    .filter_w_i  (filter_w),
    .e_trigger_o (n_e_trigger),
    .e_time_o    (n_e_time),
    .e_counter_o (n_e_counter)
  );

  edge_process #(
    .PROGRAMMABLE (PROGRAMMABLE),
    .FILTER_W     (FILTER_W)
  ) u_s_process (
    .clk         (clk),
    .rst         (rst),
    .word_i      (s_word),
    .coarse_i    (coarse),
    .filter_w_i  (filter_w),
    .e_trigger_o (s_e_trigger),
    .e_time_o    (s_e_time),
    .e_counter_o (s_e_counter)
  );

  edge_coinc #(
    .PROGRAMMABLE (PROGRAMMABLE),
    .WIN_W        (WIN_W),
    .WINDOW       (WINDOW)
  ) u_coinc (
    .clk            (clk),
    .rst            (rst),
    .n_trigger_i    (n_e_trigger),
    .n_time_i       (n_e_time),
    .s_trigger_i    (s_e_trigger),
    .s_time_i       (s_e_time),
    .window_i       (window),
    .ns_c_trigger_o (ns_c_trigger)
  );

endmodule
