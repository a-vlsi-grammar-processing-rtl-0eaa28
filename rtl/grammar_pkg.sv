// grammar_pkg: types and constants shared by the grammar processing subsystem.
//
// All probabilities are kept in the log domain, so a product of two
// probabilities is a sum and no multiplier is needed. This design stores a
// probability p as an unsigned cost, -log(p) in fixed point: 0 is probability
// one, a larger cost is a smaller probability, and the all-ones value stands
// for probability zero ("impossible"). With that encoding "the larger
// probability" is the smaller cost, and a log-domain product is a saturating
// add that keeps "impossible" absorbing. The encoding and all widths below
// are this design's own choice; the log-domain arithmetic is the document's.
//
// Word numbering: word j of the vocabulary belongs to successor group
// j mod N_GP (handled by Grammar Processor j mod N_GP) and lives at local
// address j / N_GP inside that group of the Word Probability Memory.
package grammar_pkg;

  // Vocabulary and partitioning (defaults follow the prototype).
  localparam int unsigned N_WORDS_DEF = 3000;  // vocabulary size
  localparam int unsigned N_GP_DEF    = 4;     // Grammar Processors

  // Widths (own choice).
  localparam int unsigned PROB_W = 16;   // log-domain probability (cost)
  localparam int unsigned WORD_W = 12;   // word index, 3000 words < 4096
  localparam int unsigned BT_W   = 16;   // backtrace pointer

  localparam int unsigned LOCAL_W  = 10;  // address inside one group, 750 words < 1024
  localparam int unsigned SUCC_AW  = 16;  // successor memory address

  typedef logic [PROB_W-1:0] prob_t;
  typedef logic [LOCAL_W-1:0] local_t;
  typedef logic [SUCC_AW-1:0] succ_addr_t;
  typedef logic [WORD_W-1:0] word_t;
  typedef logic [BT_W-1:0]   bt_t;

  localparam prob_t PROB_ZERO = '1;  // probability 0 (impossible)

  // One entry of a receiving FIFO: a word that ended, its probability PGO
  // and its backtrace pointer. An entry with eof set carries no word and
  // marks the end of the words of the current frame.
  typedef struct packed {
    logic  eof;
    word_t word;
    prob_t pgo;
    bt_t   bt;
  } pgo_entry_t;

  // One entry of the Word Probability Memory: PGI and its backtrace pointer.
  typedef struct packed {
    prob_t prob;
    bt_t   bt;
  } wp_entry_t;

  // One entry of a successor list: the successor's address in its group of
  // the Word Probability Memory, the transition probability c_ij, and the
  // flag that ends the list (the three fields named by the document).
  typedef struct packed {
    logic   last;
    prob_t  cij;
    local_t succ;
  } succ_entry_t;

  // List head of word i: whether word i has successors in this group and
  // where its list starts (own addition; the document does not say how the
  // list of word i is located).
  typedef struct packed {
    logic       has_list;
    succ_addr_t start;
  } succ_head_t;

  localparam wp_entry_t WP_EMPTY = '{prob: PROB_ZERO, bt: '0};

  // Log-domain product: saturating add of two costs.
  function automatic prob_t pmul(prob_t a, prob_t b);
    logic [PROB_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (a == PROB_ZERO || b == PROB_ZERO || s[PROB_W]) return PROB_ZERO;
    return s[PROB_W-1:0];
  endfunction

  // True when probability a is at least as large as probability b.
  function automatic logic pge(prob_t a, prob_t b);
    return a <= b;
  endfunction

endpackage
