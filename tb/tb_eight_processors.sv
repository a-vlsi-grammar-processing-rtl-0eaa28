// tb_eight_processors: the subsystem built with eight Grammar Processors
// instead of four, over the same 3000-word vocabulary (eight groups of 375
// words, eight successor memories, nine receiving FIFOs). The original
// design names adding processors as its way to handle larger grammars; this
// bench shows the parameterised top still computes the same result at that
// size. It drives the top's ports exactly as tb_grammar_subsystem does:
// loads random sorted successor lists and epsilon tables over the load
// ports, then runs three frames, streaming word ends into the PGO port as
// fast as it is accepted and taking the 3000 starting probabilities from
// the PGI port with random stalls. Every output is compared with a
// sequential reference of equations (1), (2) and (3) with the dynamic
// threshold; threshold cuts, FIFO back-pressure and output stalls must all
// occur. The choice of eight processors and the random stimulus are our own.
module tb_eight_processors;
  import grammar_pkg::*;
  localparam int NW = 3000, G = 8, MAXL = 6, FRAMES = 3;

  logic clk = 0, rst_n = 0, init_busy;
  logic frame_start = 0, frame_done;
  prob_t thresh_offset = 16'd3000;
  logic pgo_valid = 0, pgo_ready;
  pgo_entry_t pgo_data = '0;
  logic pgi_valid, pgi_ready;
  word_t pgi_word;
  prob_t pgi_prob;
  bt_t pgi_bt;
  logic [G-1:0] succ_head_we = '0, succ_list_we = '0;
  word_t succ_head_waddr = '0;
  succ_head_t succ_head_wdata = '0;
  succ_addr_t succ_list_waddr = '0;
  succ_entry_t succ_list_wdata = '0;
  logic ep1_we = 0, ep2_we = 0;
  word_t ep_waddr = '0;
  prob_t ep_wdata = '0;

  grammar_subsystem #(.N_GP(G)) dut (.*);

  always #5 clk = !clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic prob_t padd(prob_t a, prob_t b);
    int s;
    s = int'(a) + int'(b);
    if (a == 16'hffff || b == 16'hffff || s >= 65535) return 16'hffff;
    return prob_t'(s);
  endfunction

  // tables
  prob_t ep1 [NW], ep2 [NW];
  int len [G][NW];
  int lsucc [G][NW][MAXL];   // successor word number j
  int lcost [G][NW][MAXL];
  wp_entry_t ref_bank [NW];  // what the "current" bank will hold
  wp_entry_t ref_next [NW];
  prob_t exp_prob [NW];
  bt_t exp_bt [NW];

  // mechanism counters
  int n_cut = 0, n_last = 0, n_empty = 0, n_arcs = 0, n_bp = 0, n_stall = 0;
  int n_eps = 0, n_gram = 0;
  bit stall_mode = 0;
  int got = 0;

  always @(posedge clk) if (rst_n) begin
    if (pgo_valid && !pgo_ready) n_bp++;
    if (pgi_valid && !pgi_ready) n_stall++;
    if (pgi_valid && pgi_ready) begin
      check(int'(pgi_word) == got, "word order");
      check(pgi_prob == exp_prob[got % NW], "PGI value");
      check(pgi_bt == exp_bt[got % NW], "PGI backtrace pointer");
      got <= got + 1;
    end
  end
  always @(negedge clk) pgi_ready = stall_mode ? ($urandom_range(4) != 0) : 1'b1;

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addr [G];
    prob_t max_prev, mx;
    bt_t bt_prev, mbt;

    // ---- tables ----
    for (int j = 0; j < NW; j++) begin
      ep1[j] = prob_t'($urandom_range(6000, 1500));
      ep2[j] = prob_t'($urandom_range(6000, 1500));
      ref_bank[j] = WP_EMPTY;
    end
    for (int g = 0; g < G; g++) begin
      addr[g] = 0;
      for (int i = 0; i < NW; i++) begin
        int c;
        len[g][i] = ((i + g) % 5 == 0) ? 0 : $urandom_range(MAXL, 1);
        c = $urandom_range(1000);
        for (int k = 0; k < len[g][i]; k++) begin
          int j, dup;
          do begin
            // the first 40 words share a few successors, so that
            // back-to-back lists update the same entry (bypass)
            j = (i < 40 ? $urandom_range(7) : $urandom_range(NW / G - 1)) * G + g;
            dup = 0;
            for (int q = 0; q < k; q++) if (lsucc[g][i][q] == j) dup = 1;
          end while (dup);
          c = c + $urandom_range(1500);
          lsucc[g][i][k] = j; lcost[g][i][k] = c;
        end
      end
    end

    repeat (3) @(negedge clk);
    rst_n = 1;
    // ---- load ----
    for (int j = 0; j < NW; j++) begin
      @(negedge clk);
      ep1_we = 1; ep2_we = 0; ep_waddr = word_t'(j); ep_wdata = ep1[j];
      @(negedge clk);
      ep1_we = 0; ep2_we = 1; ep_wdata = ep2[j];
    end
    @(negedge clk); ep2_we = 0;
    for (int g = 0; g < G; g++) begin
      int a;
      a = 0;
      for (int i = 0; i < NW; i++) begin
        @(negedge clk);
        succ_list_we = '0;
        succ_head_we = '0; succ_head_we[g] = 1'b1;
        succ_head_waddr = word_t'(i);
        succ_head_wdata = '{has_list: (len[g][i] > 0), start: succ_addr_t'(a)};
        for (int k = 0; k < len[g][i]; k++) begin
          @(negedge clk);
          succ_head_we = '0;
          succ_list_we = '0; succ_list_we[g] = 1'b1;
          succ_list_waddr = succ_addr_t'(a);
          succ_list_wdata = '{last: (k == len[g][i]-1), cij: prob_t'(lcost[g][i][k]),
                              succ: local_t'(lsucc[g][i][k] / G)};
          a++;
        end
      end
      @(negedge clk); succ_head_we = '0; succ_list_we = '0;
    end
    while (init_busy) @(negedge clk);
    check(frame_done, "idle before the first frame");

    // ---- frames ----
    max_prev = 16'hffff; bt_prev = '0;
    for (int f = 0; f < FRAMES; f++) begin
      pgo_entry_t words [$];
      int gp_cyc [G];
      int best_len, t0, t1, nw;
      prob_t best [G];
      // expected output of this frame, equations (2) and (3)
      for (int j = 0; j < NW; j++) begin
        prob_t cand;
        cand = padd(max_prev, ep2[j]);
        if (pge(ref_bank[j].prob, cand)) begin
          exp_prob[j] = ref_bank[j].prob; exp_bt[j] = ref_bank[j].bt;
          if (ref_bank[j].prob != 16'hffff) n_gram++;
        end else begin
          exp_prob[j] = cand; exp_bt[j] = bt_prev; n_eps++;
        end
      end
      // this frame's word ends; reference of equation (1) and of the
      // epsilon running maximum
      nw = (f == 0) ? 50 : 400;
      mx = 16'hffff; mbt = '0;
      for (int j = 0; j < NW; j++) ref_next[j] = WP_EMPTY;
      for (int g = 0; g < G; g++) begin best[g] = 16'hffff; gp_cyc[g] = 8; end
      for (int w = 0; w < nw; w++) begin
        pgo_entry_t e;
        e = '{eof: 1'b0, word: word_t'(w % 3 == 0 ? $urandom_range(39) : $urandom_range(NW-1)), pgo: prob_t'($urandom_range(3000)),
              bt: bt_t'($urandom)};
        words.push_back(e);
        if (padd(e.pgo, ep1[e.word]) < mx) begin mx = padd(e.pgo, ep1[e.word]); mbt = e.bt; end
        for (int g = 0; g < G; g++) begin
          int m;
          m = -1;
          if (len[g][e.word] == 0) n_empty++;
          for (int k = 0; k < len[g][e.word]; k++) begin
            prob_t s;
            int j;
            s = padd(e.pgo, prob_t'(lcost[g][e.word][k]));
            j = lsucc[g][e.word][k];
            if (s > padd(best[g], thresh_offset)) begin m = k; n_cut++; break; end
            n_arcs++;
            if (s < best[g]) best[g] = s;
            if (s < ref_next[j].prob) ref_next[j] = '{prob: s, bt: e.bt};
            if (k == len[g][e.word]-1) begin m = k; n_last++; end
          end
          // arc slots: one per entry, one more for a cut before the end;
          // a word with no list may cost one bubble
          gp_cyc[g] += (len[g][e.word] == 0) ? 1 : (m < len[g][e.word]-1) ? m + 2 : len[g][e.word];
        end
      end
      best_len = NW;
      for (int g = 0; g < G; g++) if (gp_cyc[g] > best_len) best_len = gp_cyc[g];

      stall_mode = (f == 2);
      got = 0;
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      t0 = $time / 10;
      // stream the words and the end-of-frame marker
      words.push_back('{eof: 1'b1, word: '0, pgo: '0, bt: '0});
      while (words.size() > 0) begin
        pgo_valid = 1; pgo_data = words[0];
        @(posedge clk);
        if (pgo_ready) void'(words.pop_front());
        @(negedge clk);
      end
      pgo_valid = 0;
      while (!frame_done) @(negedge clk);
      t1 = $time / 10;
      check(got == NW, "all words sent");
      $display("frame %0d: %0d word ends, %0d cycles, bound %0d cycles",
               f, nw, t1 - t0, best_len);
      if (!stall_mode) check(t1 - t0 <= best_len + 12, "one successor arc per cycle");
      for (int j = 0; j < NW; j++) ref_bank[j] = ref_next[j];
      max_prev = mx; bt_prev = mbt;
    end
    $display("arcs %0d, cuts %0d, list ends %0d, empty lists %0d, fifo full %0d, output stalls %0d",
             n_arcs, n_cut, n_last, n_empty, n_bp, n_stall);
    check(n_cut > 0, "threshold cut");
    check(n_bp > 0, "FIFO back-pressure");
    check(n_stall > 0, "output stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
