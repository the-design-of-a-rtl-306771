`timescale 1ps / 1ps

// tb_edge_process: self-checking testbench of the edge processing unit.
// A random detector signal (low and high runs of 1 to 40 samples) is cut into
// words and fed to a programmable instance, whose filter width is changed
// every few hundred words, and to a hard-wired instance with a filter of 4
// samples. A reference model, working on the flat sample stream, finds the
// accepted edges of each word: a low sample followed by at least F high
// samples. It checks the trigger, the coarse and fine time of the first edge
// and the edge count, two clocks after the word was presented.
module tb_edge_process;
  import tdc_pkg::*;

  localparam int NWORDS = 3000;
  localparam int HW_F   = 4;

  logic clk = 1'b0;
  logic rst = 1'b1;
  word_t   word;
  coarse_t coarse;
  fine_t   fw;

  logic       p_trig, h_trig;
  edge_time_t p_time, h_time;
  logic [COUNT_W-1:0] p_cnt, h_cnt;

  int checks = 0, failures = 0;
  int edges_seen = 0, filtered = 0, boundary = 0, multi = 0;

  always #2000 clk = ~clk;

  edge_process #(.PROGRAMMABLE(1'b1)) dut_p (
    .clk(clk), .rst(rst), .word_i(word), .coarse_i(coarse), .filter_w_i(fw),
    .e_trigger_o(p_trig), .e_time_o(p_time), .e_counter_o(p_cnt));

  edge_process #(.PROGRAMMABLE(1'b0), .FILTER_W(HW_F)) dut_h (
    .clk(clk), .rst(rst), .word_i(word), .coarse_i(coarse), .filter_w_i(fine_t'(1)),
    .e_trigger_o(h_trig), .e_time_o(h_time), .e_counter_o(h_cnt));

  // flat sample stream, one extra word of zeros at each end
  bit stream [(NWORDS + 4) * WORD_W];
  int fw_of_word [NWORDS + 4];

  // reference: accepted edges at sample g of the stream with filter f
  function automatic bit ref_edge(int g, int f);
    if (g == 0) return 0;
    if (stream[g-1] != 0) return 0;
    for (int k = 0; k < f; k++)
      if (stream[g+k] != 1) return 0;
    return 1;
  endfunction

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic check_word(int n, int f, logic trig, edge_time_t t,
                            logic [COUNT_W-1:0] cnt, ref int unsigned total,
                            input bit count_mech);
    int first = -1, cnt_here = 0;
    for (int p = 0; p < WORD_W; p++)
      if (ref_edge(n * WORD_W + WORD_W + p, f)) begin
        if (first < 0) first = p;
        cnt_here++;
      end
    total += cnt_here;
    check(trig == (first >= 0), $sformatf("word %0d F=%0d trigger %0b", n, f, trig));
    if (first >= 0 && trig) begin
      check(t.coarse == coarse_t'(n) && t.fine == fine_t'(first),
            $sformatf("word %0d time %0d.%0d expected %0d.%0d", n, t.coarse, t.fine, n, first));
    end
    check(cnt == COUNT_W'(total), $sformatf("word %0d count %0d expected %0d", n, cnt, total));
    if (count_mech) begin
      if (first >= 0) edges_seen++;
      if (first == 0 && stream[n * WORD_W + WORD_W - 1] == 0) boundary++;
      if (cnt_here > 1) multi++;
      for (int p = 0; p < WORD_W; p++)
        if (ref_edge(n * WORD_W + WORD_W + p, 1) && !ref_edge(n * WORD_W + WORD_W + p, f))
          filtered++;
    end
  endtask

  initial begin
    #((NWORDS + 100) * 4000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic int unsigned tot_p = 0, tot_h = 0;
    automatic int g = WORD_W;
    automatic bit level = 0;
    // build the signal; word index n occupies stream[(n+1)*WORD_W +: WORD_W]
    foreach (stream[i]) stream[i] = 0;
    while (g < (NWORDS + 1) * WORD_W) begin
      automatic int len = (level == 0) ? 1 + $urandom_range(0, 39) : 1 + $urandom_range(0, 39);
      if ($urandom_range(0, 3) == 0) len = 1 + $urandom_range(0, 3);
      for (int k = 0; k < len && g < (NWORDS + 1) * WORD_W; k++) stream[g++] = level;
      level = !level;
    end
    for (int n = 0; n < NWORDS + 4; n++)
      fw_of_word[n] = ((n / 300) % WORD_W) + 1;

    word = '0; coarse = '0; fw = fine_t'(1);
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (int j = 0; j < NWORDS + 2; j++) begin
      // results of word j-2 are on the outputs now
      if (j >= 2) begin
        check_word(j - 2, fw_of_word[j - 2], p_trig, p_time, p_cnt, tot_p, 1'b1);
        check_word(j - 2, HW_F, h_trig, h_time, h_cnt, tot_h, 1'b0);
      end
      for (int p = 0; p < WORD_W; p++) word[p] = stream[(j + 1) * WORD_W + p];
      coarse = coarse_t'(j);
      // the filter width belongs to the word being judged, one clock behind
      fw = fine_t'(fw_of_word[j > 0 ? j - 1 : 0]);
      @(negedge clk);
    end
    check(edges_seen > 100, "edges occurred");
    check(filtered > 10, "filter rejected short pulses");
    check(boundary > 5, "edges at the word boundary");
    check(multi > 0, "several edges in one word");
    $display("edges=%0d filtered=%0d boundary=%0d multi=%0d", edges_seen, filtered, boundary, multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
