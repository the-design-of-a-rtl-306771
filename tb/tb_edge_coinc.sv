`timescale 1ps / 1ps

// tb_edge_coinc: self-checking testbench of the coincidence unit.
// Directed cases first: two edges one sample (~333 ps) apart, as in a pair of
// hits 428 ps apart, must not coincide with a 1-sample window but must with 2
// and 3 samples; a pair split over two words and two clocks; a pair whose
// edges arrive in different clocks; a used edge that must not pair again.
// Then random north and south edge streams with a window changed every 200
// clocks, checked against a reference model that works on integer sample
// times, on a programmable instance and on a hard-wired one (window 3).
module tb_edge_coinc;
  import tdc_pkg::*;

  localparam int HW_WIN = 3;

  logic clk = 1'b0;
  logic rst = 1'b1;
  logic n_trig, s_trig;
  edge_time_t n_time, s_time;
  logic [7:0] window;
  logic c_p, c_h;

  int checks = 0, failures = 0;
  int n_hits = 0, n_same = 0, n_held = 0;

  always #2000 clk = ~clk;

  edge_coinc #(.PROGRAMMABLE(1'b1)) dut_p (
    .clk(clk), .rst(rst), .n_trigger_i(n_trig), .n_time_i(n_time),
    .s_trigger_i(s_trig), .s_time_i(s_time), .window_i(window),
    .ns_c_trigger_o(c_p));

  edge_coinc #(.PROGRAMMABLE(1'b0), .WINDOW(HW_WIN)) dut_h (
    .clk(clk), .rst(rst), .n_trigger_i(n_trig), .n_time_i(n_time),
    .s_trigger_i(s_trig), .s_time_i(s_time), .window_i(8'd0),
    .ns_c_trigger_o(c_h));

  // reference model state: held edge per channel as integer sample times
  typedef struct {
    longint nh, sh;
    bit     nv, sv;
  } ref_t;
  ref_t rp, rh;

  function automatic longint ts(edge_time_t t);
    return longint'(t.coarse) * WORD_W + longint'(t.fine);
  endfunction

  function automatic bit near(longint a, longint b, int w);
    longint d = a > b ? a - b : b - a;
    return d < longint'(w);
  endfunction

  // one clock of the reference; returns whether a coincidence is signalled
  function automatic bit ref_step(ref ref_t r, input bit nt, longint na, bit st,
                                  longint sa, int w, output int kind);
    bit hit = 0, nu = 0, su = 0, nhu = 0, shu = 0;
    kind = 0;
    if (nt && st && near(na, sa, w)) begin hit = 1; nu = 1; su = 1; kind = 1; end
    if (nt && !nu && r.sv && near(na, r.sh, w)) begin hit = 1; nu = 1; shu = 1; kind = 2; end
    if (st && !su && r.nv && near(sa, r.nh, w)) begin hit = 1; su = 1; nhu = 1; kind = 2; end
    if (nt) begin r.nh = na; r.nv = !nu; end else if (nhu) r.nv = 0;
    if (st) begin r.sh = sa; r.sv = !su; end else if (shu) r.sv = 0;
    return hit;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // apply one clock of inputs, then compare both instances with the model
  task automatic step(bit nt, edge_time_t nv, bit st, edge_time_t sv, int w,
                      string what);
    bit ep, eh;
    int kind, kind_h;
    n_trig = nt; n_time = nv; s_trig = st; s_time = sv; window = 8'(w);
    ep = ref_step(rp, nt, ts(nv), st, ts(sv), w, kind);
    eh = ref_step(rh, nt, ts(nv), st, ts(sv), HW_WIN, kind_h);
    @(negedge clk);
    check(c_p == ep, $sformatf("%s: programmable trigger %0b expected %0b", what, c_p, ep));
    check(c_h == eh, $sformatf("%s: hard-wired trigger %0b expected %0b", what, c_h, eh));
    if (ep) begin
      n_hits++;
      if (kind == 1) n_same++;
      if (kind == 2) n_held++;
    end
  endtask

  function automatic edge_time_t mk(int c, int f);
    return '{coarse: coarse_t'(c), fine: fine_t'(f)};
  endfunction

  task automatic idle(int w);
    step(0, mk(0, 0), 0, mk(0, 0), w, "idle");
  endtask

  task automatic do_reset();
    rst = 1'b1;
    n_trig = 0; s_trig = 0; n_time = '0; s_time = '0; window = 8'd1;
    rp = '{nh: 0, sh: 0, nv: 0, sv: 0};
    rh = '{nh: 0, sh: 0, nv: 0, sv: 0};
    repeat (2) @(negedge clk);
    rst = 1'b0;
  endtask

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int c = 10;
    do_reset();
    // directed: edges one sample apart in the same clock, windows 1, 2, 3
    for (int w = 1; w <= 3; w++) begin
      step(1, mk(c, 4), 1, mk(c, 5), w, $sformatf("1-sample pair, window %0d", w));
      check(c_p == (w >= 2), $sformatf("1-sample pair with window %0d", w));
      c += 10;
      idle(w);
    end
    // same sample, window 1
    step(1, mk(c, 7), 1, mk(c, 7), 1, "same-sample pair");
    check(c_p == 1, "same-sample pair coincides with window 1");
    c += 10; idle(1);
    // pair across the word boundary, arriving in two clocks
    step(1, mk(c, 11), 0, mk(0, 0), 2, "north late in word");
    step(0, mk(0, 0), 1, mk(c + 1, 0), 2, "south early in next word");
    check(c_p == 1, "pair across word boundary");
    c += 10; idle(2);
    // south first, north later, window 3; then a second north must not pair
    step(0, mk(0, 0), 1, mk(c, 3), 3, "south first");
    step(1, mk(c, 5), 0, mk(0, 0), 3, "north second");
    check(c_p == 1, "held south pairs with later north");
    step(1, mk(c, 6), 0, mk(0, 0), 3, "another north");
    check(c_p == 0, "used south edge does not pair again");
    c += 10; idle(3);
    // window 0 disables
    step(1, mk(c, 2), 1, mk(c, 2), 0, "window 0");
    check(c_p == 0, "window 0 gives no coincidence");

    // random streams
    do_reset();
    c = 0;
    for (int i = 0; i < 4000; i++) begin
      automatic int w = (i / 200) % 6;
      automatic bit nt = ($urandom_range(0, 2) == 0);
      automatic bit st = ($urandom_range(0, 2) == 0);
      c += 1;
      step(nt, mk(c, $urandom_range(0, WORD_W - 1)), st,
           mk(c - $urandom_range(0, 1), $urandom_range(0, WORD_W - 1)), w, "random");
    end
    check(n_hits > 50, "coincidences occurred");
    check(n_same > 10, "same-clock pairs occurred");
    check(n_held > 10, "pairs with a held edge occurred");
    $display("hits=%0d same=%0d held=%0d", n_hits, n_same, n_held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
