// epsilon_memory: one of the two epsilon tables of the epsilon-model. Ep1
// holds eps_i, the probability out of word i; Ep2 holds eps_j, the
// probability into word j; both are log-domain costs, one per vocabulary
// word, so the N x N low-probability transitions eps_i x eps_j take only 2N
// words of storage. The table is written from the load port and read by
// the Epsilon Processor with a registered read (data one cycle after re,
// held while re is low). Contents follow the document; ports are own choice.
module epsilon_memory
  import grammar_pkg::*;
#(
  parameter int unsigned N_WORDS = N_WORDS_DEF
) (
  input  logic  clk,
  input  logic  we,
  input  word_t waddr,
  input  prob_t wdata,
  input  logic  re,
  input  word_t raddr,
  output prob_t rdata
);
  localparam int unsigned AW = $clog2(N_WORDS);

  sync_ram #(.DEPTH(N_WORDS), .WIDTH(PROB_W)) u_ram (
    .clk,
    .we, .waddr(waddr[AW-1:0]), .wdata,
    .re, .raddr(raddr[AW-1:0]), .rdata
  );
endmodule
