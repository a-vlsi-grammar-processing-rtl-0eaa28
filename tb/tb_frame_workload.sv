// tb_frame_workload: the prototype's operating points. A 3000-word
// vocabulary and four Grammar Processors run two grammars in turn:
//   200,000 arcs (50,000 per processor, 16 or 17 successors per word in each
//   group), the stated capacity of four processors in a 10 ms frame, and
//   210,000 arcs (52,500 per processor), an average of 70 successors per word.
// For each grammar the tables are loaded, then in one frame all 3000 words
// end; the threshold offset is so high that no list is cut, so every
// processor walks all of its arcs. The frame must take one cycle per arc
// plus a few cycles of fill and drain; for 50,000 arcs that is the
// 50,000-cycle budget of a 10 ms frame at 5 MHz. The following frame's 3000
// outputs are checked against a sequential reference of equations (1)-(3).
module tb_frame_workload;
  import grammar_pkg::*;
  localparam int NW = 3000, G = 4, FRAME_CYCLES = 50000;
  localparam int ARCS_OF [2] = '{50000, 52500};

  logic clk = 0, rst_n = 0, init_busy;
  logic frame_start = 0, frame_done;
  prob_t thresh_offset = 16'hfffe;
  logic pgo_valid = 0, pgo_ready;
  pgo_entry_t pgo_data = '0;
  logic pgi_valid, pgi_ready = 1;
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

  grammar_subsystem dut (.*);

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

  prob_t ep1 [NW], ep2 [NW];
  wp_entry_t ref_next [NW];
  prob_t pgo [NW];
  bt_t bt [NW];
  int got = 0, n_arcs = 0;
  prob_t mx;
  bt_t mbt;
  bit check_out = 0;

  always @(posedge clk) if (rst_n && pgi_valid && pgi_ready) begin
    if (check_out) begin
      prob_t cand, e;
      bt_t eb;
      cand = padd(mx, ep2[got]);
      if (pge(ref_next[got].prob, cand)) begin e = ref_next[got].prob; eb = ref_next[got].bt; end
      else begin e = cand; eb = mbt; end
      check(int'(pgi_word) == got, "word order");
      check(pgi_prob == e && pgi_bt == eb, "PGI value and backtrace pointer");
    end
    got <= got + 1;
  end

  initial begin
    #40ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t0, t1;
    for (int j = 0; j < NW; j++) begin
      ep1[j] = prob_t'($urandom_range(8000, 3000));
      ep2[j] = prob_t'($urandom_range(8000, 3000));
      pgo[j] = prob_t'($urandom_range(4000));
      bt[j]  = bt_t'($urandom);
    end
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < NW; j++) begin
      @(negedge clk); ep1_we = 1; ep2_we = 0; ep_waddr = word_t'(j); ep_wdata = ep1[j];
      @(negedge clk); ep1_we = 0; ep2_we = 1; ep_wdata = ep2[j];
    end
    @(negedge clk); ep2_we = 0;
    // the epsilon-model maximum: every word ends, in word order
    mx = 16'hffff; mbt = '0;
    for (int i = 0; i < NW; i++)
      if (padd(pgo[i], ep1[i]) < mx) begin mx = padd(pgo[i], ep1[i]); mbt = bt[i]; end

    for (int run = 0; run < 2; run++) begin
      int arcs;
      arcs = ARCS_OF[run];
      for (int j = 0; j < NW; j++) ref_next[j] = WP_EMPTY;
      check_out = 0;
      // successor lists: in each group word i gets arcs / NW + 1 entries for
      // the first arcs mod NW words and arcs / NW for the rest, distinct
      // successors in increasing cost. The reference of equation (1) is
      // built alongside: words arrive in word order, so a later word only
      // wins with a strictly better product.
      for (int g = 0; g < G; g++) begin
        int a;
        a = 0;
        for (int i = 0; i < NW; i++) begin
          int l, c, base, step;
          l = (i < arcs % NW) ? arcs / NW + 1 : arcs / NW;
          @(negedge clk);
          succ_list_we = '0;
          succ_head_we = '0; succ_head_we[g] = 1'b1;
          succ_head_waddr = word_t'(i);
          succ_head_wdata = '{has_list: 1'b1, start: succ_addr_t'(a)};
          c = $urandom_range(500);
          base = $urandom_range(NW / G - 1);
          step = 1 + 2 * $urandom_range(20);  // odd step: at least 30 distinct in 750
          for (int k = 0; k < l; k++) begin
            int loc, j;
            prob_t s;
            loc = (base + k * step) % (NW / G);
            j = loc * G + g;
            c = c + $urandom_range(600);
            @(negedge clk);
            succ_head_we = '0;
            succ_list_we = '0; succ_list_we[g] = 1'b1;
            succ_list_waddr = succ_addr_t'(a);
            succ_list_wdata = '{last: (k == l-1), cij: prob_t'(c), succ: local_t'(loc)};
            a++;
            s = padd(pgo[i], prob_t'(c));
            if (s < ref_next[j].prob) ref_next[j] = '{prob: s, bt: bt[i]};
          end
        end
        check(a == arcs, "arcs per processor");
        @(negedge clk); succ_head_we = '0; succ_list_we = '0;
      end
      while (init_busy) @(negedge clk);

      // frame with all words ending
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      t0 = $time / 10;
      for (int i = 0; i <= NW; i++) begin
        pgo_valid = 1;
        pgo_data = (i < NW) ? '{eof: 1'b0, word: word_t'(i), pgo: pgo[i], bt: bt[i]}
                            : '{eof: 1'b1, word: '0, pgo: '0, bt: '0};
        @(posedge clk);
        while (!pgo_ready) @(posedge clk);
        @(negedge clk);
      end
      pgo_valid = 0;
      while (!frame_done) @(negedge clk);
      t1 = $time / 10;
      $display("frame with %0d arcs per processor: %0d cycles (10 ms at 5 MHz: %0d)",
               arcs, t1 - t0, FRAME_CYCLES);
      check(t1 - t0 <= arcs + 16, "one arc per cycle");
      if (arcs <= FRAME_CYCLES) check(t1 - t0 <= FRAME_CYCLES + 16, "frame fits the 10 ms budget at 5 MHz");
      // the next frame sends the results; no words end in it
      got = 0;
      check_out = 1;
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      @(negedge clk); pgo_valid = 1; pgo_data = '{eof: 1'b1, word: '0, pgo: '0, bt: '0};
      @(negedge clk); pgo_valid = 0;
      while (!frame_done) @(negedge clk);
      check(got == NW, "all words sent");
      // the epsilon maximum of that empty frame is "impossible"
      mx = 16'hffff; mbt = '0;
      check_out = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
