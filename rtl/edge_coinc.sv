// edge_coinc: time-coincidence unit of a north-south coincidence channel.
//
// Each edge processing unit reports an accepted edge with a one-clock trigger
// and its time stamp. This unit compares the time of every new edge with the
// time of the edges of the other channel and raises ns_c_trigger_o for one
// clock when a north and a south edge lie within the coincidence window.
//
// Times are compared as whole numbers of sample periods (coarse*WORD_W + fine),
// and two edges coincide when the magnitude of their difference is below the
// window: |t_n - t_s| < W, W counted in sample periods of about 333 ps. So
// W = 1 accepts only edges in the same sample (window ~300 ps), W = 2 edges
// one sample apart (~600 ps), W = 3 two samples apart (~900 ps). W = 0
// disables the trigger.
//
// Because the two edges of a pair need not arrive in the same clock, the unit
// keeps the latest edge of each channel. A new edge is paired first with a new
// edge of the other channel in the same clock, otherwise with the held edge of
// the other channel. Edges that formed a pair are marked used and take part in
// no further coincidence, so one photon pair gives one trigger. When two pairs
// form in the same clock they give a single one-clock trigger pulse.
//
// Two architectures, chosen by PROGRAMMABLE: 1 takes the window from window_i,
// which may change at any clock; 0 uses the WINDOW parameter.
//
// Timing: ns_c_trigger_o follows the edge trigger that completes a pair by
// one clock. Interface: clk, synchronous active-high rst, n_/s_ edge trigger
// and time from the two edge processing units, window_i.
//
// From the reference design: comparison of each new edge with the edges of the
// other channel, the time window, the programmable and hard-wired variants.
// This design's choices: the window rule (strictly below W samples), holding
// one edge per channel, consuming paired edges, the reset.
`timescale 1ps / 1ps

module edge_coinc
  import tdc_pkg::*;
#(
  parameter bit          PROGRAMMABLE = 1'b1,
  parameter int unsigned WIN_W        = 8,
  parameter int unsigned WINDOW       = 1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             n_trigger_i,
  input  edge_time_t       n_time_i,
  input  logic             s_trigger_i,
  input  edge_time_t       s_time_i,
  input  logic [WIN_W-1:0] window_i,
  output logic             ns_c_trigger_o
);

  edge_time_t n_held_q, s_held_q;
  logic       n_valid_q, s_valid_q;

  logic [WIN_W-1:0] win;
  assign win = PROGRAMMABLE ? window_i : WIN_W'(WINDOW);

  function automatic logic close(edge_time_t a, edge_time_t b,
                                 logic [WIN_W-1:0] w);
    tsamp_t ta, tb, d;
    ta = to_samples(a);
    tb = to_samples(b);
    d  = (ta >= tb) ? ta - tb : tb - ta;
    return d < tsamp_t'(w);
  endfunction

  logic hit, n_used, s_used, n_held_used, s_held_used;

  always_comb begin
    hit         = 1'b0;
    n_used      = 1'b0;
    s_used      = 1'b0;
    n_held_used = 1'b0;
    s_held_used = 1'b0;
    if (n_trigger_i && s_trigger_i && close(n_time_i, s_time_i, win)) begin
      hit = 1'b1; n_used = 1'b1; s_used = 1'b1;
    end
    if (n_trigger_i && !n_used && s_valid_q && close(n_time_i, s_held_q, win)) begin
      hit = 1'b1; n_used = 1'b1; s_held_used = 1'b1;
    end
    if (s_trigger_i && !s_used && n_valid_q && close(s_time_i, n_held_q, win)) begin
      hit = 1'b1; s_used = 1'b1; n_held_used = 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      n_held_q       <= '0;
      s_held_q       <= '0;
      n_valid_q      <= 1'b0;
      s_valid_q      <= 1'b0;
      ns_c_trigger_o <= 1'b0;
    end else begin
      ns_c_trigger_o <= hit;
      if (n_trigger_i) begin
        n_held_q  <= n_time_i;
        n_valid_q <= !n_used;
      end else if (n_held_used) begin
        n_valid_q <= 1'b0;
      end
      if (s_trigger_i) begin
        s_held_q  <= s_time_i;
        s_valid_q <= !s_used;
      end else if (s_held_used) begin
        s_valid_q <= 1'b0;
      end
    end
  end

endmodule
