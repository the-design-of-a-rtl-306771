// edge_process: edge detection, edge filter and time stamping for one input
// channel of the coincidence trigger.
//
// Every core clock the sampler delivers a word of WORD_W samples of the
// detector signal, sample 0 being the earliest. A valid edge is a low-to-high
// transition: a low sample followed by a high one, the low sample possibly
// being the last sample of the previous word. The edge filter rejects pulses
// shorter than a given width: an edge at sample p is accepted only if samples
// p .. p+F-1 are all high, where F is the filter width in samples (F = 1 keeps
// every transition). Because a pulse that starts late in a word may only be
// confirmed by the next word, each word is judged one clock after it arrives,
// with the following word as look-ahead, so F may be at most WORD_W.
//
// For every word holding at least one accepted edge the unit pulses
// e_trigger_o for one clock, gives the time of the first accepted edge on
// e_time_o (the coarse counter value latched with the word and the sample
// index as fine time) and adds the number of accepted edges in the word to the
// 32-bit e_counter_o, which counts edges since reset and wraps. There is no
// dead time: a word is processed every clock, whatever the previous ones held.
// Only the first edge of a word is time-stamped; a second edge in the same
// 4 ns word (possible only for pulses shorter than one word) is counted but not
// stamped.
//
// Two architectures, chosen by PROGRAMMABLE: 1 takes the filter width from
// filter_w_i, so it can be changed while running; 0 uses the FILTER_W
// parameter, and synthesis removes the logic for the other widths. A width of
// 0 is treated as 1, a width above WORD_W as WORD_W.
//
// Timing: a word presented on word_i at clock k (with coarse_i of the same
// clock) gives its result on the outputs after clock k+2.
//
// From the reference design: the edge search per word, the coarse + fine
// time stamp, the 32-bit edge counter, the edge filter and the two
// architectures. This design's choices: the filter rule (minimum high time
// after the edge), the one-word look-ahead, one stamp per word, the reset.
`timescale 1ps / 1ps

module edge_process
  import tdc_pkg::*;
#(
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter int unsigned FILTER_W     = 1
) (
  input  logic       clk,
  input  logic       rst,
  input  word_t      word_i,
  input  coarse_t    coarse_i,
  input  fine_t      filter_w_i,
  output logic       e_trigger_o,
  output edge_time_t e_time_o,
  output logic [COUNT_W-1:0] e_counter_o
);

  localparam int unsigned EXT_W = 2 * WORD_W + 1;

  word_t   cur_q;        // word under judgement
  coarse_t cur_coarse_q; // coarse time latched with it
  logic    prev_last_q;  // last sample of the word before it

  always_ff @(posedge clk) begin
    if (rst) begin
      cur_q        <= '0;
      cur_coarse_q <= '0;
      prev_last_q  <= 1'b0;
    end else begin
      cur_q        <= word_i;
      cur_coarse_q <= coarse_i;
      prev_last_q  <= cur_q[WORD_W-1];
    end
  end

  // effective filter width, clamped to 1 .. WORD_W
  int unsigned fw;
  always_comb begin
    fw = PROGRAMMABLE ? int'(filter_w_i) : FILTER_W;
    if (fw == 0)      fw = 1;
    if (fw > WORD_W)  fw = WORD_W;
  end

  // ext[0] is the last sample of the previous word, ext[1 +: WORD_W] the word
  // under judgement and the rest the look-ahead word
  logic [EXT_W-1:0]   ext;
  logic [WORD_W-1:0]  edge_at;
  logic               any_edge;
  fine_t              first_pos;
  logic [FINE_W:0]    n_edges;

  always_comb begin
    ext = {word_i, cur_q, prev_last_q};
    for (int p = 0; p < WORD_W; p++) begin
      edge_at[p] = !ext[p] && ext[p+1];
      for (int k = 1; k < WORD_W; k++)
        if (k < fw && !ext[p+1+k]) edge_at[p] = 1'b0;
    end

    any_edge  = |edge_at;
    first_pos = '0;
    for (int p = WORD_W - 1; p >= 0; p--)
      if (edge_at[p]) first_pos = fine_t'(p);
    n_edges = '0;
    for (int p = 0; p < WORD_W; p++)
      n_edges = n_edges + (FINE_W+1)'(edge_at[p]);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      e_trigger_o <= 1'b0;
      e_time_o    <= '0;
      e_counter_o <= '0;
    end else begin
      e_trigger_o <= any_edge;
      if (any_edge) e_time_o <= '{coarse: cur_coarse_q, fine: first_pos};
      e_counter_o <= e_counter_o + COUNT_W'(n_edges);
    end
  end

endmodule
