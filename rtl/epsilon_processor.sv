// epsilon_processor: the epsilon-model processor and frame controller.
// Low-probability transitions are modelled as c_ij ~ eps_i x eps_j, so
// max over i of PGO_i x eps_i x eps_j needs only one running maximum per
// frame instead of N x N products (equation (2)). The chip has two
// independent sections (document, Figure 7):
//
// Section 1 (running maximum): takes each word i from its receiving FIFO,
//   reads eps_i from Ep1 and keeps MAX = max PGO_i x eps_i over the frame,
//   with the backtrace pointer of the word that set it. The FIFO's
//   end-of-frame marker ends the section's work for the frame.
// Section 2 (successor output): for every word j = 0 .. N_WORDS-1 it reads
//   eps_j from Ep2 and PGI_j from the "current" Word Probability Memory
//   bank, forms MAX(previous frame) x eps_j and sends the larger of the two
//   to the word processing subsystem (equation (3)), with the backtrace
//   pointer that belongs to the winner. A tie goes to the stored grammar
//   value. The bank entry is cleared as it is read, so the bank is empty
//   when it becomes the "next" bank.
//
// Frame control (this design's choice of protocol): frame_start, accepted
// only while frame_done is high, swaps the banks (bank_sel toggles), hands
// the finished MAX from section 1 to section 2, restarts both sections and
// one cycle later pulses gp_start to the Grammar Processors. frame_done
// rises when all words have been sent, section 1 has seen the marker and
// every Grammar Processor reports done, as the document describes.
//
// Output handshake: pgi_valid/pgi_ready; data is held while valid and not
// ready. Both sections use registered memory reads; section 2 sends one word
// per cycle when pgi_ready stays high, and section 1 takes one FIFO entry
// per cycle.
module epsilon_processor
  import grammar_pkg::*;
#(
  parameter int unsigned N_WORDS = N_WORDS_DEF,
  parameter int unsigned N_GP    = N_GP_DEF
) (
  input  logic       clk,
  input  logic       rst_n,
  // frame control
  input  logic       frame_start,
  output logic       frame_done,
  output logic       bank_sel,
  output logic       gp_start,
  input  logic [N_GP-1:0] gp_done,
  // section 1: receiving FIFO and Ep1
  input  logic       fifo_empty,
  input  pgo_entry_t fifo_dout,
  output logic       fifo_pop,
  output logic       ep1_re,
  output word_t      ep1_raddr,
  input  prob_t      ep1_rdata,
  // section 2: Ep2, "current" bank, output to the word processing subsystem
  output logic       ep2_re,
  output word_t      ep2_raddr,
  input  prob_t      ep2_rdata,
  output logic       wp_re,
  output logic       wp_clr,
  output word_t      wp_raddr,
  input  wp_entry_t  wp_rdata,
  output logic       pgi_valid,
  input  logic       pgi_ready,
  output word_t      pgi_word,
  output prob_t      pgi_prob,
  output bt_t        pgi_bt
);
  logic  start;
  // section 1
  logic  s1_run, s1_v;
  prob_t s1_pgo, max1;
  bt_t   s1_bt, bt1;
  prob_t s1_sum;
  logic  s1_done;
  // section 2
  prob_t max2;
  bt_t   bt2;
  logic  s2_run;
  word_t j;
  logic  s2_issue, advance, d_v;
  word_t d_j;
  prob_t cand;
  logic  eps_wins;
  logic  s2_done;

  assign start = frame_start && frame_done;

  // ---------------- section 1 ----------------
  assign fifo_pop  = s1_run && !fifo_empty;
  assign ep1_re    = fifo_pop && !fifo_dout.eof;
  assign ep1_raddr = fifo_dout.word;
  assign s1_sum    = pmul(s1_pgo, ep1_rdata);
  assign s1_done   = !s1_run && !s1_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_run <= 1'b0;
      s1_v   <= 1'b0;
      s1_pgo <= PROB_ZERO;
      s1_bt  <= '0;
      max1   <= PROB_ZERO;
      bt1    <= '0;
    end else begin
      s1_v <= ep1_re;
      if (ep1_re) begin
        s1_pgo <= fifo_dout.pgo;
        s1_bt  <= fifo_dout.bt;
      end
      if (start) begin
        s1_run <= 1'b1;
        max1   <= PROB_ZERO;
        bt1    <= '0;
      end else begin
        if (fifo_pop && fifo_dout.eof) s1_run <= 1'b0;
        if (s1_v && s1_sum < max1) begin
          max1 <= s1_sum;
          bt1  <= s1_bt;
        end
      end
    end
  end

  // ---------------- section 2 ----------------
  assign advance   = !pgi_valid || pgi_ready;
  assign s2_issue  = s2_run && advance;
  assign ep2_re    = s2_issue;
  assign ep2_raddr = j;
  assign wp_re     = s2_issue;
  assign wp_clr    = s2_issue;
  assign wp_raddr  = j;
  assign cand      = pmul(max2, ep2_rdata);
  assign eps_wins  = !pge(wp_rdata.prob, cand);
  assign s2_done   = !s2_run && !d_v && !pgi_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max2      <= PROB_ZERO;
      bt2       <= '0;
      s2_run    <= 1'b0;
      j         <= '0;
      d_v       <= 1'b0;
      d_j       <= '0;
      pgi_valid <= 1'b0;
      pgi_word  <= '0;
      pgi_prob  <= PROB_ZERO;
      pgi_bt    <= '0;
    end else begin
      if (start) begin
        max2   <= max1;
        bt2    <= bt1;
        s2_run <= 1'b1;
        j      <= '0;
      end else if (s2_issue) begin
        j <= j + 1'b1;
        if (32'(j) == N_WORDS - 1) s2_run <= 1'b0;
      end
      if (advance) begin
        d_v       <= s2_issue;
        d_j       <= j;
        pgi_valid <= d_v;
        if (d_v) begin
          pgi_word <= d_j;
          pgi_prob <= eps_wins ? cand : wp_rdata.prob;
          pgi_bt   <= eps_wins ? bt2  : wp_rdata.bt;
        end
      end
    end
  end

  // ---------------- frame control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bank_sel   <= 1'b0;
      gp_start   <= 1'b0;
      frame_done <= 1'b1;
    end else begin
      gp_start <= start;
      if (start) begin
        bank_sel   <= !bank_sel;
        frame_done <= 1'b0;
      end else if (!frame_done && !gp_start && s1_done && s2_done && (&gp_done)) begin
        frame_done <= 1'b1;
      end
    end
  end

  a_pgi_hold: assert property (@(posedge clk) disable iff (!rst_n)
    pgi_valid && !pgi_ready |=> pgi_valid && $stable(pgi_word) && $stable(pgi_prob));
endmodule
