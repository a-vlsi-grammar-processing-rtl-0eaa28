// grammar_processor: evaluates equation (1) of the statistical grammar,
// PGI_j(t+1) = max over i of PGO_i(t) x c_ij, for the successor words of one
// group. For each word i taken from its receiving FIFO it walks the
// pre-compiled successor list of i, forms PGO_i x c_ij (a log-domain add),
// reads the PGI_j collected so far in the "next" bank of the Word
// Probability Memory, and writes back the larger of the two with its
// backtrace pointer. A dynamic threshold stops a list early: the entries of
// a list are sorted by decreasing c_ij, so once PGO_i x c_ij falls below the
// threshold all later entries do too. The threshold is the best (largest)
// product seen in this frame scaled by the user's offset factor, i.e. in the
// log domain best cost + thresh_offset. (Document: equation (1), the
// successor-list fields, sorted lists, threshold from a running maximum and
// an offset, one arc per 200 ns cycle with a read and a write of different
// locations, five pipeline stages, separate address generation, control and
// threshold sections. The stage split, list head lookup, word prefetch,
// bypasses, FIFO end-of-frame marker and tie handling are this design's.)
//
// Word fetch runs ahead of the arc pipeline: it pops the next word, reads
// its list head (skipping words with no list in this group) and parks it in
// a one-entry buffer W, so the next list starts in the cycle after the end
// of the current one is seen.
//
// Arc pipeline, one successor arc per cycle, lists back to back:
//   P1 address generation: issue the successor-memory read (the next entry
//      of the current list, or the first entry of the list in W)
//   P2 the entry arrives; its end-of-list flag switches address generation
//      to the next list in the same cycle; PGO_i x c_ij is formed
//   P3 threshold compare; a survivor reads PGI_j and updates the running
//      best; a cut squashes the arc in P2 if it is of the same list and
//      switches address generation to the next list (one lost slot)
//   P4 PGI_j arrives; the larger of PGI_j and PGO_i x c_ij is chosen (a tie
//      keeps the stored value). Since consecutive lists may share a
//      successor, the values being written (P5) and written one cycle ago
//      (P6) are forwarded when they are for the same entry.
//   P5 write back
// Each in-flight arc carries a 2-bit list tag so a cut squashes only arcs
// of its own list. Successors within one list must be distinct.
//
// Frame protocol: frame_start (one cycle, only while done is high) resets
// the running best and lets the processor consume its FIFO. A FIFO entry
// with eof set ends the frame for this processor; done rises once all
// fetched words are processed and the pipeline has drained, and stays high
// until the next frame_start.
module grammar_processor
  import grammar_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        frame_start,
  input  prob_t       thresh_offset,
  output logic        done,
  // receiving FIFO
  input  logic        fifo_empty,
  input  pgo_entry_t  fifo_dout,
  output logic        fifo_pop,
  // successor memory
  output logic        head_re,
  output word_t       head_raddr,
  input  succ_head_t  head_rdata,
  output logic        list_re,
  output succ_addr_t  list_raddr,
  input  succ_entry_t list_rdata,
  // own group of the "next" Word Probability Memory bank
  output logic        wp_re,
  output local_t      wp_raddr,
  input  wp_entry_t   wp_rdata,
  output logic        wp_we,
  output local_t      wp_waddr,
  output wp_entry_t   wp_wdata
);
  typedef logic [1:0] tag_t;

  // a list being walked or waiting to be walked
  typedef struct packed {
    logic       v;
    succ_addr_t start;
    prob_t      pgo;
    bt_t        bt;
  } word_buf_t;

  typedef struct packed {
    logic  v;
    tag_t  tag;
    prob_t pgo;
    bt_t   bt;
  } p2_t;

  typedef struct packed {
    logic   v;
    tag_t   tag;
    prob_t  sum;
    local_t succ;
    bt_t    bt;
  } p3_t;

  typedef struct packed {
    logic   v;
    prob_t  sum;
    local_t succ;
    bt_t    bt;
  } p4_t;

  typedef struct packed {
    logic      v;
    local_t    succ;
    wp_entry_t e;
  } wb_t;

  // word fetch
  logic       running;
  logic       h_v;
  prob_t      h_pgo;
  bt_t        h_bt;
  logic       h_leave;
  word_buf_t  w;
  // address generation
  logic       cur_v;
  tag_t       cur_tag;
  prob_t      cur_pgo;
  bt_t        cur_bt;
  succ_addr_t ptr;
  logic       end_now, cur_stop, take_w, issue;
  succ_addr_t issue_addr;
  // pipeline
  p2_t        p2;
  p3_t        p3;
  p4_t        p4;
  wb_t        p5, p6;
  logic       p2_kill;
  // threshold
  prob_t      best, thr;
  logic       cut_stop;
  // compare
  logic       fwd5, fwd6;
  wp_entry_t  old_e, new_e;

  // ---------------- threshold (P3) ----------------
  assign thr      = pmul(best, thresh_offset);
  assign cut_stop = p3.v && !pge(p3.sum, thr);
  assign p2_kill  = cut_stop && (p2.tag == p3.tag);

  // ---------------- address generation and control ----------------
  assign end_now  = p2.v && !p2_kill && (p2.tag == cur_tag) && list_rdata.last;
  assign cur_stop = cur_v && (end_now || (cut_stop && p3.tag == cur_tag));
  assign take_w   = w.v && (!cur_v || cur_stop);
  assign issue    = take_w || (cur_v && !cur_stop);
  assign issue_addr = take_w ? w.start : ptr;

  assign list_re    = issue;
  assign list_raddr = issue_addr;

  // ---------------- word fetch ----------------
  assign h_leave    = h_v && (!head_rdata.has_list || !w.v || take_w);
  assign fifo_pop   = running && !fifo_empty && (!h_v || h_leave);
  assign head_re    = fifo_pop && !fifo_dout.eof;
  assign head_raddr = fifo_dout.word;

  // ---------------- probability update (P3 read, P4 compare, P5 write) ----
  assign wp_re    = p3.v && !cut_stop;
  assign wp_raddr = p3.succ;

  assign fwd5  = p5.v && (p5.succ == p4.succ);
  assign fwd6  = !fwd5 && p6.v && (p6.succ == p4.succ);
  assign old_e = fwd5 ? p5.e : (fwd6 ? p6.e : wp_rdata);
  assign new_e = (p4.sum < old_e.prob) ? '{prob: p4.sum, bt: p4.bt} : old_e;

  assign wp_we    = p5.v;
  assign wp_waddr = p5.succ;
  assign wp_wdata = p5.e;

  assign done = !running && !h_v && !w.v && !cur_v && !p2.v && !p3.v && !p4.v && !p5.v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      h_v     <= 1'b0;
      h_pgo   <= PROB_ZERO;
      h_bt    <= '0;
      w       <= '0;
      cur_v   <= 1'b0;
      cur_tag <= '0;
      cur_pgo <= PROB_ZERO;
      cur_bt  <= '0;
      ptr     <= '0;
      best    <= PROB_ZERO;
      p2      <= '0;
      p3      <= '0;
      p4      <= '0;
      p5      <= '0;
      p6      <= '0;
    end else begin
      // word fetch
      if (frame_start) running <= 1'b1;
      else if (fifo_pop && fifo_dout.eof) running <= 1'b0;
      if (head_re) begin
        h_v   <= 1'b1;
        h_pgo <= fifo_dout.pgo;
        h_bt  <= fifo_dout.bt;
      end else if (h_leave) begin
        h_v <= 1'b0;
      end
      if (h_leave && head_rdata.has_list)
        w <= '{v: 1'b1, start: head_rdata.start, pgo: h_pgo, bt: h_bt};
      else if (take_w)
        w.v <= 1'b0;

      // address generation
      if (take_w) begin
        cur_v   <= 1'b1;
        cur_tag <= cur_tag + 1'b1;
        cur_pgo <= w.pgo;
        cur_bt  <= w.bt;
      end else if (cur_stop) begin
        cur_v <= 1'b0;
      end
      if (issue) ptr <= issue_addr + 1'b1;

      // P1 -> P2
      p2.v   <= issue;
      p2.tag <= take_w ? cur_tag + 1'b1 : cur_tag;
      p2.pgo <= take_w ? w.pgo : cur_pgo;
      p2.bt  <= take_w ? w.bt  : cur_bt;
      // P2 -> P3
      p3.v    <= p2.v && !p2_kill;
      p3.tag  <= p2.tag;
      p3.sum  <= pmul(p2.pgo, list_rdata.cij);
      p3.succ <= list_rdata.succ;
      p3.bt   <= p2.bt;
      // P3 -> P4, running best for the threshold
      p4.v    <= p3.v && !cut_stop;
      p4.sum  <= p3.sum;
      p4.succ <= p3.succ;
      p4.bt   <= p3.bt;
      if (frame_start) best <= PROB_ZERO;
      else if (p3.v && !cut_stop && p3.sum < best) best <= p3.sum;
      // P4 -> P5 -> P6
      p5.v    <= p4.v;
      p5.succ <= p4.succ;
      p5.e    <= new_e;
      p6      <= p5;
    end
  end

  a_start_when_done: assert property (@(posedge clk) disable iff (!rst_n)
    frame_start |-> done);
endmodule
