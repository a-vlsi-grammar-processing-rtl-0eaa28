// tb_epsilon_processor: the Epsilon Processor with behavioural FIFO, Ep1,
// Ep2 and "current" bank models. Over several frames it checks the running
// maximum of PGO_i x eps_i (section 1), every output word
// max(MAX x eps_j, PGI_j) with its backtrace pointer in word order
// (section 2, equations (2) and (3)), the clear of each bank entry, the bank
// swap, completion only after the Grammar Processors report done, output
// stalls, and the output rate of one word per cycle when never stalled.
module tb_epsilon_processor;
  import grammar_pkg::*;
  localparam int N = 50, G = 4, FRAMES = 5;

  logic clk = 0, rst_n = 0;
  logic frame_start = 0, frame_done, bank_sel, gp_start;
  logic [G-1:0] gp_done;
  logic fifo_empty, fifo_pop;
  pgo_entry_t fifo_dout;
  logic ep1_re, ep2_re, wp_re, wp_clr;
  word_t ep1_raddr, ep2_raddr, wp_raddr;
  prob_t ep1_rdata, ep2_rdata;
  wp_entry_t wp_rdata;
  logic pgi_valid, pgi_ready;
  word_t pgi_word;
  prob_t pgi_prob;
  bt_t pgi_bt;

  epsilon_processor #(.N_WORDS(N), .N_GP(G)) dut (.*);

  always #5 clk = !clk;

  // behavioural FIFO
  pgo_entry_t fq [512];
  int fw = 0, fr = 0;
  assign fifo_empty = (fr >= fw);
  assign fifo_dout  = fq[fr % 512];
  always @(posedge clk) if (fifo_pop) fr <= fr + 1;

  // behavioural memories with registered reads
  prob_t ep1 [N], ep2 [N];
  wp_entry_t cur [N];
  always @(posedge clk) begin
    if (ep1_re) ep1_rdata <= ep1[ep1_raddr];
    if (ep2_re) ep2_rdata <= ep2[ep2_raddr];
    if (wp_re)  wp_rdata  <= cur[wp_raddr];
    if (wp_clr) cur[wp_raddr] <= WP_EMPTY;
  end

  int checks = 0, failures = 0;
  int n_eps = 0, n_gram = 0, n_stall = 0;

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

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output collector
  int got = 0;
  prob_t exp_prob [N];
  bt_t exp_bt [N];
  bit stall_mode;
  always @(posedge clk) if (rst_n) begin
    if (pgi_valid && !pgi_ready) n_stall++;
    if (pgi_valid && pgi_ready) begin
      check(int'(pgi_word) == got, "word order");
      check(pgi_prob == exp_prob[got % N], "PGI value");
      check(pgi_bt == exp_bt[got % N], "PGI backtrace pointer");
      got <= got + 1;
    end
  end
  always @(negedge clk) pgi_ready = stall_mode ? ($urandom_range(3) != 0) : 1'b1;

  initial begin
    prob_t max_prev;
    bt_t bt_prev;
    logic bank_prev;
    gp_done = '1;
    stall_mode = 0;
    max_prev = 16'hffff; bt_prev = '0;
    for (int j = 0; j < N; j++) begin
      ep1[j] = prob_t'($urandom_range(4000));
      ep2[j] = prob_t'($urandom_range(4000));
      cur[j] = WP_EMPTY;
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(frame_done, "idle after reset");
    for (int f = 0; f < FRAMES; f++) begin
      prob_t mx;
      bt_t mbt;
      int t0, tlast, gp_delay;
      // contents the Grammar Processors left in the bank that is now current
      for (int j = 0; j < N; j++) begin
        if (f > 0 && $urandom_range(2) == 0) cur[j] = '{prob: prob_t'($urandom_range(9000)), bt: bt_t'($urandom)};
        else cur[j] = WP_EMPTY;
        if (f > 0 && j == 7) cur[j] = '{prob: padd(max_prev, ep2[j]), bt: 16'h5a5a};  // tie
        if (pge(cur[j].prob, padd(max_prev, ep2[j]))) begin
          exp_prob[j] = cur[j].prob; exp_bt[j] = cur[j].bt; n_gram++;
        end else begin
          exp_prob[j] = padd(max_prev, ep2[j]); exp_bt[j] = bt_prev; n_eps++;
        end
      end
      // this frame's word ends and the running maximum they give
      mx = 16'hffff; mbt = '0;
      for (int w = 0; w < $urandom_range(30, 5); w++) begin
        pgo_entry_t e;
        e = '{eof: 1'b0, word: word_t'($urandom_range(N-1)), pgo: prob_t'($urandom_range(5000)), bt: bt_t'($urandom)};
        fq[fw % 512] = e; fw++;
        if (padd(e.pgo, ep1[e.word]) < mx) begin mx = padd(e.pgo, ep1[e.word]); mbt = e.bt; end
      end
      fq[fw % 512] = '{eof: 1'b1, word: '0, pgo: '0, bt: '0}; fw++;
      stall_mode = (f % 2 == 1);
      gp_delay = (f == 2) ? 3 * N : 5;
      got = 0;
      bank_prev = bank_sel;
      @(negedge clk); frame_start = 1;
      @(negedge clk); frame_start = 0;
      check(bank_sel != bank_prev, "banks swap at frame start");
      check(gp_start, "Grammar Processors started");
      check(!frame_done, "frame busy");
      t0 = $time / 10;
      @(negedge clk); gp_done = '0;
      fork
        begin repeat (gp_delay) @(negedge clk); gp_done = '1; end
        begin
          while (got < N) @(negedge clk);
          tlast = $time / 10;
        end
      join
      while (!frame_done) begin
        @(negedge clk);
      end
      if (!stall_mode) check(tlast - t0 <= N + 4, "one output word per cycle");
      check(got == N, "all words sent once");
      check($time / 10 >= t0 + gp_delay, "completion waits for the Grammar Processors");
      for (int j = 0; j < N; j++) check(cur[j] == WP_EMPTY, "current bank cleared");
      max_prev = mx; bt_prev = mbt;
    end
    $display("epsilon wins %0d, grammar wins %0d, stalled cycles %0d", n_eps, n_gram, n_stall);
    check(n_stall > 0, "output stall occurred");
    check(n_eps > 0 && n_gram > 0, "both sources win");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
