`timescale 1ps / 1ps

// tb_ns_coinc_channel_hw: end-to-end testbench of the hard-wired variant of
// the north-south coincidence channel (PROGRAMMABLE = 0, filter width 3
// samples, window 2 samples, about 600 ps).
//
// Same stimulus and reference as tb_ns_coinc_channel: pad pulses placed to
// the picosecond, one event per 60 ns slot, expected edges, time stamps,
// counts and coincidences computed from the sampling instants. The filter and
// window inputs are driven with changing values that the hard-wired channel
// must ignore: every expectation uses the fixed filter width and window. The
// 428 ps pair must coincide, glitches shorter than three samples must be
// dropped, and pairs further apart than one sample must be refused.

module tb_ns_coinc_channel_hw;
  import tdc_pkg::*;

  localparam int     CLK_PS  = 4000;
  localparam longint T0      = CLK_PS / 2;   // first rising clock edge
  localparam longint SLOT    = 60_000;
  localparam int     NPAIRS  = 40;
  localparam int     NMIX    = 300;
  localparam int     HW_F    = 3;
  localparam int     HW_WIN  = 2;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic n_pad = 1'b0, s_pad = 1'b0;
  fine_t filter_w = fine_t'(1);
  logic [7:0] window = 8'd1;

  logic n_trig, s_trig, c_trig;
  edge_time_t n_time, s_time;
  logic [COUNT_W-1:0] n_cnt, s_cnt;

  int checks = 0, failures = 0;

  always #(CLK_PS / 2) clk = ~clk;

  ns_coinc_channel #(
    .PROGRAMMABLE(1'b0), .FILTER_W(HW_F), .WINDOW(HW_WIN)
  ) dut (
    .clk(clk), .rst(rst), .n_es_pad(n_pad), .s_es_pad(s_pad),
    .filter_w(filter_w), .window(window),
    .n_e_trigger(n_trig), .n_e_time(n_time), .n_e_counter(n_cnt),
    .s_e_trigger(s_trig), .s_e_time(s_time), .s_e_counter(s_cnt),
    .ns_c_trigger(c_trig));

  // ---- reference: sampling instants -------------------------------------
  function automatic longint instant(longint g);
    return T0 + (g / WORD_W) * CLK_PS + ((g % WORD_W) * CLK_PS) / WORD_W;
  endfunction

  // index of the first sample taken after time t
  function automatic longint first_sample(longint t);
    longint g = ((t - T0) / CLK_PS) * WORD_W;
    while (instant(g) <= t) g++;
    return g;
  endfunction

  // a pad change never falls on a sampling instant (it would race the sample)
  function automatic longint off_grid(longint t);
    return (instant(first_sample(t - 1)) == t) ? t + 1 : t;
  endfunction

  // number of samples taken while the pulse [tr, tf) is high
  function automatic int high_samples(longint tr, longint tf);
    longint g = first_sample(tr);
    int n = 0;
    while (instant(g) < tf) begin g++; n++; end
    return n;
  endfunction

  // ---- monitor of the outputs -------------------------------------------
  int         n_trigs, s_trigs, c_trigs;
  edge_time_t n_seen, s_seen;
  int         n_trig_cyc, s_trig_cyc, c_trig_cyc;
  int         cyc = 0;

  always @(negedge clk) begin
    cyc++;
    if (!rst) begin
      if (n_trig) begin n_trigs++; n_seen = n_time; n_trig_cyc = cyc; end
      if (s_trig) begin s_trigs++; s_seen = s_time; s_trig_cyc = cyc; end
      if (c_trig) begin c_trigs++; c_trig_cyc = cyc; end
    end
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---- mechanism counters ------------------------------------------------
  int m_stamp = 0, m_coinc = 0, m_refused = 0, m_filtered = 0,
      m_split = 0, m_win_change = 0, m_filt_change = 0;
  int unsigned exp_n_cnt = 0, exp_s_cnt = 0;
  longint k_off;       // time stamp (samples) minus sample index
  bit     k_known = 0;
  int     lat_off;     // clock of the edge trigger minus coarse time stamp
  bit     lat_known = 0;

  // one event: pulses start at slot + base + offset, widths in ps
  task automatic run_event(longint slot_start, bit n_on, int n_off, int n_w,
                           bit s_on, int s_off, int s_w, int w, int f,
                           output bit hit);
    int     wi = w, fi = f;
    longint base = slot_start + 6000;
    longint ntr = off_grid(base + n_off), ntf = off_grid(base + n_off + n_w);
    longint str = off_grid(base + s_off), stf = off_grid(base + s_off + s_w);
    longint gn = first_sample(ntr), gs = first_sample(str);
    bit n_pass = n_on && high_samples(ntr, ntf) >= HW_F;
    bit s_pass = s_on && high_samples(str, stf) >= HW_F;
    bit exp_c;
    longint d = gn > gs ? gn - gs : gs - gn;

    if (8'(wi) != window) m_win_change++;
    if (fine_t'(fi) != filter_w) m_filt_change++;
    window = 8'(wi);
    filter_w = fine_t'(fi);
    n_trigs = 0; s_trigs = 0; c_trigs = 0;

    fork
      if (n_on) begin
        #(ntr - $time) n_pad = 1'b1;
        #(ntf - ntr)   n_pad = 1'b0;
      end
      if (s_on) begin
        #(str - $time) s_pad = 1'b1;
        #(stf - str)   s_pad = 1'b0;
      end
    join
    #(slot_start + SLOT - $time);

    exp_c = n_pass && s_pass && d < longint'(HW_WIN);
    if (n_pass) exp_n_cnt++;
    if (s_pass) exp_s_cnt++;
    check(n_trigs == int'(n_pass), $sformatf("north triggers %0d expected %0b", n_trigs, n_pass));
    check(s_trigs == int'(s_pass), $sformatf("south triggers %0d expected %0b", s_trigs, s_pass));
    check(c_trigs == int'(exp_c),
          $sformatf("coincidences %0d expected %0b (d=%0d samples, window %0d)", c_trigs, exp_c, d, w));
    check(n_cnt == COUNT_W'(exp_n_cnt), $sformatf("north count %0d expected %0d", n_cnt, exp_n_cnt));
    check(s_cnt == COUNT_W'(exp_s_cnt), $sformatf("south count %0d expected %0d", s_cnt, exp_s_cnt));
    if (n_pass && n_trigs == 1) begin
      if (!k_known) begin k_off = longint'(to_samples(n_seen)) - gn; k_known = 1; end
      if (!lat_known) begin lat_off = n_trig_cyc - int'(n_seen.coarse); lat_known = 1; end
      check(n_trig_cyc - int'(n_seen.coarse) == lat_off, "north edge trigger latency");
      check(longint'(to_samples(n_seen)) - gn == k_off, $sformatf("north time stamp %0d.%0d gn=%0d k=%0d tr=%0d w=%0d f=%0d", n_seen.coarse, n_seen.fine, gn, k_off, ntr, n_w, f));
      m_stamp++;
    end
    if (s_pass && s_trigs == 1 && k_known) begin
      check(longint'(to_samples(s_seen)) - gs == k_off, "south time stamp");
      check(s_trig_cyc - int'(s_seen.coarse) == lat_off, "south edge trigger latency");
      m_stamp++;
    end
    if (exp_c && c_trigs == 1)
      check(c_trig_cyc == (n_trig_cyc > s_trig_cyc ? n_trig_cyc : s_trig_cyc) + 1,
            "coincidence trigger one clock after the later edge trigger");
    if (exp_c) m_coinc++;
    if (n_pass && s_pass && !exp_c) m_refused++;
    if ((n_on && !n_pass) || (s_on && !s_pass)) m_filtered++;
    if (exp_c && n_trig_cyc != s_trig_cyc) m_split++;
    hit = (c_trigs != 0);
  endtask

  initial begin
    #(longint'(3 * NPAIRS + NMIX + 10) * SLOT);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int pair_n_off [NPAIRS];
  int pair_sep   [NPAIRS];
  int hits_per_window [4];

  initial begin
    automatic longint slot = 0;
    automatic bit hit;
    n_trigs = 0; s_trigs = 0; c_trigs = 0;
    n_trig_cyc = 0; s_trig_cyc = 0; c_trig_cyc = 0; lat_off = 0;
    n_seen = '0; s_seen = '0; k_off = 0;
    repeat (4) @(negedge clk);
    rst = 1'b0;
    repeat (4) @(negedge clk);
    slot = longint'(cyc + 1) * CLK_PS;   // slots start on a clock boundary

    // Part 1: same pairs under windows of 1, 2 and 3 samples
    pair_n_off[0] = 10;  pair_sep[0] = 428;   // 10 ps after a sampling instant
    for (int i = 1; i < NPAIRS; i++) begin
      pair_n_off[i] = $urandom_range(0, CLK_PS - 1);
      pair_sep[i]   = $urandom_range(0, 1200);
    end
    for (int w = 1; w <= 3; w++) begin
      hits_per_window[w] = 0;
      for (int i = 0; i < NPAIRS; i++) begin
        run_event(slot, 1, pair_n_off[i], 2000, 1, pair_n_off[i] + pair_sep[i], 2000,
                  w, 1, hit);
        if (i == 0) check(hit == 1'b1, $sformatf("428 ps pair, window input %0d", w));
        if (hit) hits_per_window[w]++;
        slot += SLOT;
      end
    end
    $display("coincidences with windows 1/2/3: %0d %0d %0d",
             hits_per_window[1], hits_per_window[2], hits_per_window[3]);
    check(hits_per_window[1] == hits_per_window[2] && hits_per_window[2] == hits_per_window[3],
          "window input has no effect");

    // Part 2: mixed traffic
    for (int i = 0; i < NMIX; i++) begin
      automatic int kind = $urandom_range(0, 5);
      automatic int w = 1 + $urandom_range(0, 3);
      automatic int f = 1 + $urandom_range(0, 3);
      automatic int off = $urandom_range(0, CLK_PS - 1);
      automatic int sep = $urandom_range(0, 1000);
      automatic int nw = 1500 + $urandom_range(0, 3000);
      automatic int sw = 1500 + $urandom_range(0, 3000);
      if (i % 25 != 0) begin w = int'(window); f = int'(filter_w); end
      case (kind)
        0: run_event(slot, 1, off, nw, 0, 0, 0, w, f, hit);                  // lone north
        1: run_event(slot, 0, 0, 0, 1, off, sw, w, f, hit);                  // lone south
        2: run_event(slot, 1, off, 100 + $urandom_range(0, 900), 1, off + sep,
                     sw, w, f, hit);                                          // north glitch
        3: run_event(slot, 1, 3800, nw, 1, 3800 + sep / 2, sw, w, f, hit);    // word boundary
        default: run_event(slot, 1, off, nw, 1, off + sep, sw, w, f, hit);   // pair
      endcase
      slot += SLOT;
    end

    $display("stamped=%0d coinc=%0d refused=%0d filtered=%0d split=%0d win_changes=%0d filt_changes=%0d",
             m_stamp, m_coinc, m_refused, m_filtered, m_split, m_win_change, m_filt_change);
    check(m_stamp > 0, "edges were time-stamped");
    check(m_coinc > 0, "coincidences occurred");
    check(m_refused > 0, "pairs refused by the window");
    check(m_filtered > 0, "glitches removed by the edge filter");
    check(m_split > 0, "pairs with edges in different clocks");
    check(m_win_change > 0, "window input changed (and ignored)");
    check(m_filt_change > 0, "filter input changed (and ignored)");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
