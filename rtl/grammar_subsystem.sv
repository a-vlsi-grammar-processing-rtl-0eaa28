// grammar_subsystem: the grammar processing subsystem of a real-time HMM
// continuous speech recogniser. Once per 10 ms frame it turns the word-end
// probabilities PGO_i sent by the word processing subsystem into the
// starting probabilities PGI_j of every vocabulary word for the next frame,
// combining a bigram grammar of high-probability arcs (equation (1), four
// Grammar Processors) with the epsilon-model for all other arcs
// (equations (2) and (3), the Epsilon Processor).
//
// Structure (document, Figure 3): every PGO entry is pushed into five
// receiving FIFOs at once, one for the Epsilon Processor and one per Grammar
// Processor. Grammar Processor g has its own Successor Memory and updates
// only group g of the "next" bank of the Word Probability Memory, the words
// j with j mod N_GP = g; the Epsilon Processor, with its Ep1 and Ep2
// memories, reads the "current" bank and drives the PGI output. The banks
// swap at every frame start.
//
// Use: after reset wait for init_busy to fall (the probability banks are
// cleared), load the successor memories and Ep1/Ep2 through the load ports,
// then for every frame pulse frame_start while frame_done is high, stream
// the frame's PGO entries followed by one entry with eof set, and take the
// N_WORDS PGI words from the pgi_* output. frame_done rises when all PGI
// words have been sent and all processors have finished the frame.
// pgo_ready is low while any receiving FIFO is full.
module grammar_subsystem
  import grammar_pkg::*;
#(
  parameter int unsigned N_WORDS    = N_WORDS_DEF,  // vocabulary (3000)
  parameter int unsigned N_GP       = N_GP_DEF,     // Grammar Processors (4)
  parameter int unsigned FIFO_DEPTH = 64,
  parameter int unsigned SUCC_DEPTH = 65536
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        init_busy,
  // frame control
  input  logic        frame_start,
  output logic        frame_done,
  input  prob_t       thresh_offset,
  // word-end probabilities from the word processing subsystem
  input  logic        pgo_valid,
  output logic        pgo_ready,
  input  pgo_entry_t  pgo_data,
  // starting word probabilities to the word processing subsystem
  output logic        pgi_valid,
  input  logic        pgi_ready,
  output word_t       pgi_word,
  output prob_t       pgi_prob,
  output bt_t         pgi_bt,
  // load ports for the pre-compiled tables
  input  logic [N_GP-1:0] succ_head_we,
  input  word_t       succ_head_waddr,
  input  succ_head_t  succ_head_wdata,
  input  logic [N_GP-1:0] succ_list_we,
  input  succ_addr_t  succ_list_waddr,
  input  succ_entry_t succ_list_wdata,
  input  logic        ep1_we,
  input  logic        ep2_we,
  input  word_t       ep_waddr,
  input  prob_t       ep_wdata
);
  localparam int unsigned NF = N_GP + 1;  // FIFO 0: Epsilon Processor

  logic       fifo_full  [NF];
  logic       fifo_empty [NF];
  logic       fifo_pop   [NF];
  pgo_entry_t fifo_dout  [NF];
  logic       push;

  logic      bank_sel, gp_start;
  logic [N_GP-1:0] gp_done;

  logic      gp_re [N_GP], gp_we [N_GP];
  local_t    gp_raddr [N_GP], gp_waddr [N_GP];
  wp_entry_t gp_rdata [N_GP], gp_wdata [N_GP];

  logic      ep1_re, ep2_re, wp_re, wp_clr;
  word_t     ep1_raddr, ep2_raddr, wp_raddr;
  prob_t     ep1_rdata, ep2_rdata;
  wp_entry_t wp_rdata;

  always_comb begin
    pgo_ready = 1'b1;
    for (int f = 0; f < NF; f++) if (fifo_full[f]) pgo_ready = 1'b0;
  end
  assign push = pgo_valid && pgo_ready;

  for (genvar f = 0; f < NF; f++) begin : g_fifo
    pgo_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .clk, .rst_n,
      .push, .din(pgo_data), .full(fifo_full[f]),
      .pop(fifo_pop[f]), .dout(fifo_dout[f]), .empty(fifo_empty[f]),
      .count()
    );
  end

  // Grammar Processor blocks: processor plus its Successor Memory
  for (genvar g = 0; g < N_GP; g++) begin : g_gp
    logic        head_re, list_re;
    word_t       head_raddr;
    succ_addr_t  list_raddr;
    succ_head_t  head_rdata;
    succ_entry_t list_rdata;

    successor_memory #(.N_WORDS(N_WORDS), .SUCC_DEPTH(SUCC_DEPTH)) u_succ (
      .clk,
      .head_we(succ_head_we[g]), .head_waddr(succ_head_waddr), .head_wdata(succ_head_wdata),
      .list_we(succ_list_we[g]), .list_waddr(succ_list_waddr), .list_wdata(succ_list_wdata),
      .head_re, .head_raddr, .head_rdata,
      .list_re, .list_raddr, .list_rdata
    );

    grammar_processor u_gp (
      .clk, .rst_n,
      .frame_start(gp_start), .thresh_offset, .done(gp_done[g]),
      .fifo_empty(fifo_empty[g+1]), .fifo_dout(fifo_dout[g+1]), .fifo_pop(fifo_pop[g+1]),
      .head_re, .head_raddr, .head_rdata,
      .list_re, .list_raddr, .list_rdata,
      .wp_re(gp_re[g]), .wp_raddr(gp_raddr[g]), .wp_rdata(gp_rdata[g]),
      .wp_we(gp_we[g]), .wp_waddr(gp_waddr[g]), .wp_wdata(gp_wdata[g])
    );
  end

  epsilon_memory #(.N_WORDS(N_WORDS)) u_ep1 (
    .clk, .we(ep1_we), .waddr(ep_waddr), .wdata(ep_wdata),
    .re(ep1_re), .raddr(ep1_raddr), .rdata(ep1_rdata)
  );

  epsilon_memory #(.N_WORDS(N_WORDS)) u_ep2 (
    .clk, .we(ep2_we), .waddr(ep_waddr), .wdata(ep_wdata),
    .re(ep2_re), .raddr(ep2_raddr), .rdata(ep2_rdata)
  );

  epsilon_processor #(.N_WORDS(N_WORDS), .N_GP(N_GP)) u_eps (
    .clk, .rst_n,
    .frame_start, .frame_done, .bank_sel, .gp_start, .gp_done,
    .fifo_empty(fifo_empty[0]), .fifo_dout(fifo_dout[0]), .fifo_pop(fifo_pop[0]),
    .ep1_re, .ep1_raddr, .ep1_rdata,
    .ep2_re, .ep2_raddr, .ep2_rdata,
    .wp_re, .wp_clr, .wp_raddr, .wp_rdata,
    .pgi_valid, .pgi_ready, .pgi_word, .pgi_prob, .pgi_bt
  );

  word_prob_memory #(.N_WORDS(N_WORDS), .N_GP(N_GP)) u_wpm (
    .clk, .rst_n, .bank_sel, .init_busy,
    .gp_re, .gp_raddr, .gp_rdata, .gp_we, .gp_waddr, .gp_wdata,
    .ep_re(wp_re), .ep_clr(wp_clr), .ep_raddr(wp_raddr), .ep_rdata(wp_rdata)
  );

  a_start_after_init: assert property (@(posedge clk) disable iff (!rst_n)
    frame_start |-> !init_busy);
endmodule
