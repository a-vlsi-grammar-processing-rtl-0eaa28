// tb_grammar_processor: one Grammar Processor with its Successor Memory, a
// behavioural FIFO and a behavioural group of the "next" probability bank.
// Random successor lists (sorted by increasing cost, distinct successors,
// some words without a list) and random word-end probabilities are run for
// several frames. A sequential reference of equation (1) with the dynamic
// threshold gives the expected bank contents after each frame. The frame
// time is checked against one arc slot per cycle: a list that runs to its
// end takes one slot per entry, a list cut at entry m takes m + 2 slots, and
// a word without a list may cost one bubble. Threshold cuts, list ends,
// empty lists and both bypasses (consecutive lists updating the same
// successor) must all occur.
module tb_grammar_processor;
  import grammar_pkg::*;
  localparam int NW = 64, LG = 8, SD = 1024, MAXL = 6, FRAMES = 6;

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, done;
  prob_t thresh_offset;
  logic fifo_empty, fifo_pop;
  pgo_entry_t fifo_dout;
  logic head_re, list_re, wp_re, wp_we;
  word_t head_raddr;
  succ_addr_t list_raddr;
  succ_head_t head_rdata;
  succ_entry_t list_rdata;
  local_t wp_raddr, wp_waddr;
  wp_entry_t wp_rdata, wp_wdata;

  // successor memory load port
  logic head_we = 0, list_we = 0;
  word_t head_waddr = '0;
  succ_head_t head_wdata = '0;
  succ_addr_t list_waddr = '0;
  succ_entry_t list_wdata = '0;

  successor_memory #(.N_WORDS(NW), .SUCC_DEPTH(SD)) u_succ (.*);
  grammar_processor dut (.*);

  // behavioural FIFO
  pgo_entry_t fq [512];
  int fw = 0, fr = 0;
  assign fifo_empty = (fr >= fw);
  assign fifo_dout  = fq[fr % 512];

  // behavioural probability bank group: registered read, read before write
  wp_entry_t bank [LG];
  always @(posedge clk) begin
    if (wp_re) wp_rdata <= bank[wp_raddr];
    if (wp_we) bank[wp_waddr] <= wp_wdata;
  end

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  int n_cut = 0, n_last = 0, n_empty = 0, n_arcs = 0;
  int n_fwd5 = 0, n_fwd6 = 0;
  always @(posedge clk) if (rst_n && dut.p4.v) begin
    if (dut.fwd5) n_fwd5++;
    if (dut.fwd6) n_fwd6++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic prob_t padd(prob_t a, prob_t b);
    int s;
    s = int'(a) + int'(b);
    if (a == 16'hffff || b == 16'hffff || s >= 65535) return 16'hffff;
    return prob_t'(s);
  endfunction

  // list contents
  int len [NW];
  int start [NW];
  int succ_of [NW][MAXL];
  int cost_of [NW][MAXL];
  wp_entry_t ref_bank [LG];

  always @(posedge clk) if (rst_n && fifo_pop) fr <= fr + 1;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addr;
    thresh_offset = 16'd3000;
    for (int l = 0; l < LG; l++) begin bank[l] = WP_EMPTY; ref_bank[l] = WP_EMPTY; end
    // build and load the successor lists
    addr = 0;
    for (int i = 0; i < NW; i++) begin
      int used [LG];
      int c;
      len[i] = (i % 7 == 3) ? 0 : $urandom_range(MAXL, 1);
      start[i] = addr;
      foreach (used[l]) used[l] = 0;
      c = $urandom_range(800);
      for (int k = 0; k < len[i]; k++) begin
        int s;
        do s = $urandom_range(LG-1); while (used[s]);
        used[s] = 1;
        c = c + $urandom_range(1200);
        succ_of[i][k] = s; cost_of[i][k] = c;
        @(negedge clk);
        list_we = 1; list_waddr = succ_addr_t'(addr);
        list_wdata = '{last: (k == len[i]-1), cij: prob_t'(c), succ: local_t'(s)};
        addr++;
      end
      @(negedge clk);
      list_we = 0;
      head_we = 1; head_waddr = word_t'(i);
      head_wdata = '{has_list: (len[i] > 0), start: succ_addr_t'(start[i])};
      @(negedge clk); head_we = 0;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (2) @(negedge clk);
    check(done, "done while waiting for a frame");

    for (int f = 0; f < FRAMES; f++) begin
      prob_t best;
      int nwords, slots, empties, t0, t1;
      best = 16'hffff;
      nwords = $urandom_range(40, 20);
      slots = 0; empties = 0;
      for (int w = 0; w < nwords; w++) begin
        int i, m;
        pgo_entry_t e;
        i = $urandom_range(NW-1);
        e = '{eof: 1'b0, word: word_t'(i), pgo: prob_t'($urandom_range(3000)), bt: bt_t'($urandom)};
        fq[fw % 512] = e; fw++;
        // reference, equation (1) with the dynamic threshold
        m = -1;
        if (len[i] == 0) begin n_empty++; empties++; end
        for (int k = 0; k < len[i]; k++) begin
          prob_t s;
          s = padd(e.pgo, prob_t'(cost_of[i][k]));
          if (s > padd(best, thresh_offset)) begin m = k; n_cut++; break; end
          n_arcs++;
          if (s < best) best = s;
          if (s < ref_bank[succ_of[i][k]].prob) ref_bank[succ_of[i][k]] = '{prob: s, bt: e.bt};
          if (k == len[i]-1) begin m = k; n_last++; end
        end
        // a cut before the last entry also loses the slot behind it
        if (len[i] > 0) slots += (m < len[i]-1) ? m + 2 : len[i];
      end
      fq[fw % 512] = '{eof: 1'b1, word: '0, pgo: '0, bt: '0}; fw++;
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      t0 = $time / 10;
      @(negedge clk);
      check(!done, "busy during the frame");
      while (!done) @(negedge clk);
      t1 = $time / 10;
      check(fr == fw, "all words popped");
      $display("frame %0d: %0d words, %0d arc slots, %0d cycles", f, nwords, slots, t1 - t0);
      check(t1 - t0 >= slots && t1 - t0 <= slots + empties + 10, "one arc slot per cycle");
      for (int l = 0; l < LG; l++) check(bank[l] == ref_bank[l], "bank entry after frame");
    end
    $display("arcs %0d, threshold cuts %0d, list ends %0d, empty lists %0d, bypass P5 %0d, P6 %0d",
             n_arcs, n_cut, n_last, n_empty, n_fwd5, n_fwd6);
    check(n_fwd5 > 0 && n_fwd6 > 0, "both bypasses used");
    check(n_cut > 0, "threshold cut occurred");
    check(n_last > 0, "end of list occurred");
    check(n_empty > 0, "empty list occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
