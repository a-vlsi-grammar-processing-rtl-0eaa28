// successor_memory: the pre-compiled successor lists of one Grammar
// Processor. Each list entry holds the successor's address in this
// processor's group of the Word Probability Memory, the transition
// probability c_ij and an end-of-list flag (the document's three fields);
// the entries of one list are stored in decreasing order of c_ij
// (increasing cost) so the processor can stop at the threshold.
//
// A second, small table indexed by the word number i gives where the list
// of word i starts and whether it has one in this group. The document does
// not say how a list is located; this head table is this design's choice.
//
// Both tables are written from the load port (host side) and read by the
// Grammar Processor through registered reads: data one cycle after the
// read enable, held while the enable is low. Every head entry that can be
// read must be written once before use.
module successor_memory
  import grammar_pkg::*;
#(
  parameter int unsigned N_WORDS    = N_WORDS_DEF,
  parameter int unsigned SUCC_DEPTH = 65536
) (
  input  logic        clk,
  // load port
  input  logic        head_we,
  input  word_t       head_waddr,
  input  succ_head_t  head_wdata,
  input  logic        list_we,
  input  succ_addr_t  list_waddr,
  input  succ_entry_t list_wdata,
  // Grammar Processor port
  input  logic        head_re,
  input  word_t       head_raddr,
  output succ_head_t  head_rdata,
  input  logic        list_re,
  input  succ_addr_t  list_raddr,
  output succ_entry_t list_rdata
);
  localparam int unsigned HAW = $clog2(N_WORDS);
  localparam int unsigned LAW = $clog2(SUCC_DEPTH);

  sync_ram #(.DEPTH(N_WORDS), .WIDTH($bits(succ_head_t))) u_head (
    .clk,
    .we(head_we), .waddr(head_waddr[HAW-1:0]), .wdata(head_wdata),
    .re(head_re), .raddr(head_raddr[HAW-1:0]), .rdata(head_rdata)
  );

  sync_ram #(.DEPTH(SUCC_DEPTH), .WIDTH($bits(succ_entry_t))) u_list (
    .clk,
    .we(list_we), .waddr(list_waddr[LAW-1:0]), .wdata(list_wdata),
    .re(list_re), .raddr(list_raddr[LAW-1:0]), .rdata(list_rdata)
  );
endmodule
