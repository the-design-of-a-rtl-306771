`timescale 1ps / 1ps

// tb_edge_sample: self-checking testbench of the sampler model.
// The pad signal toggles at random picosecond instants (never exactly on a
// sampling instant). For every core period the testbench works out the level
// of the signal at each of the twelve sampling instants (period start plus
// k*4000/12 ps) from its own list of toggle times and compares the word the
// model presents one clock later.
module tb_edge_sample;
  import tdc_pkg::*;

  localparam int NPER   = 400;
  localparam int CLK_PS = 4000;
  localparam int NTOG   = 900;

  logic  clk = 1'b0;
  logic  pad = 1'b0;
  word_t word;
  int checks = 0, failures = 0;
  longint tog [NTOG];

  always #(CLK_PS / 2) clk = ~clk;

  edge_sample dut (.clk(clk), .pad(pad), .word_o(word));

  function automatic bit is_sample_instant(longint t);
    longint r;
    if (t < CLK_PS / 2) return 0;
    r = (t - CLK_PS / 2) % CLK_PS;
    for (int k = 0; k < WORD_W; k++)
      if (r == longint'(k * CLK_PS / WORD_W)) return 1;
    return 0;
  endfunction

  // level of the pad at time t: number of toggles at or before t, modulo 2
  function automatic bit level_at(longint t);
    bit l = 0;
    for (int i = 0; i < NTOG; i++)
      if (tog[i] <= t) l = !l;
    return l;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    #((NPER + 20) * CLK_PS);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // pad stimulus
  initial begin
    automatic longint t = 3000;
    for (int i = 0; i < NTOG; i++) begin
      t += 50 + $urandom_range(0, 3000);
      while (is_sample_instant(t)) t++;
      tog[i] = t;
    end
    for (int i = 0; i < NTOG; i++) begin
      #(tog[i] - (i == 0 ? 0 : tog[i-1]));
      pad = !pad;
    end
  end

  initial begin
    automatic int ones = 0;
    // period k runs from rising edge k (at CLK_PS/2 + k*CLK_PS) to edge k+1;
    // its word is on word_o after rising edge k+1
    @(posedge clk);
    for (int k = 0; k < NPER; k++) begin
      automatic word_t exp_w;
      automatic longint t0 = longint'(CLK_PS / 2) + longint'(k) * CLK_PS;
      @(posedge clk);
      @(negedge clk);
      for (int s = 0; s < WORD_W; s++)
        exp_w[s] = level_at(t0 + longint'(s * CLK_PS / WORD_W));
      check(word == exp_w, $sformatf("period %0d word %03h expected %03h", k, word, exp_w));
      ones += $countones(word);
    end
    check(ones > NPER, "signal was high in part of the samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
