// word_prob_memory: the two-bank Word Probability Memory. Each entry holds a
// starting word probability PGI and the backtrace pointer of the predecessor
// that produced it. Bank "next" (t+1) is written by the Grammar Processors,
// bank "current" (t) is read by the Epsilon Processor; bank_sel names the
// bank that is "next", and toggling it between frames swaps the roles. Each
// bank is split into N_GP groups, one per Grammar Processor, so processors
// never contend for a memory (document, Figures 3 and 4). Word j is in group
// j mod N_GP at local address j / N_GP (this design's interleaving).
//
// Ports per Grammar Processor: one registered read and one write per cycle
// at different locations, into its group of the "next" bank. Epsilon port:
// a registered read of word j from the "current" bank; with ep_clr the same
// entry is reset to "impossible" in the same cycle (the read returns the old
// value), so the bank starts the following frame, as "next", empty. Clearing
// on read is this design's choice; the document only says the banks swap.
//
// After reset both banks are cleared, one address per cycle, while
// init_busy is high (GDEPTH cycles); the ports are ignored meanwhile.
module word_prob_memory
  import grammar_pkg::*;
#(
  parameter int unsigned N_WORDS = N_WORDS_DEF,
  parameter int unsigned N_GP    = N_GP_DEF,   // power of two, at least 2
  localparam int unsigned GW     = $clog2(N_GP),
  localparam int unsigned GDEPTH = (N_WORDS + N_GP - 1) / N_GP,
  localparam int unsigned AW     = (GDEPTH > 1) ? $clog2(GDEPTH) : 1
) (
  input  logic      clk,
  input  logic      rst_n,
  input  logic      bank_sel,
  output logic      init_busy,
  // Grammar Processor ports ("next" bank)
  input  logic      gp_re    [N_GP],
  input  local_t    gp_raddr [N_GP],
  output wp_entry_t gp_rdata [N_GP],
  input  logic      gp_we    [N_GP],
  input  local_t    gp_waddr [N_GP],
  input  wp_entry_t gp_wdata [N_GP],
  // Epsilon Processor port ("current" bank)
  input  logic      ep_re,
  input  logic      ep_clr,
  input  word_t     ep_raddr,
  output wp_entry_t ep_rdata
);
  logic [AW-1:0] init_addr;
  logic          bank_q;
  logic [GW-1:0] ep_grp, ep_grp_q;
  local_t        ep_local;
  wp_entry_t     rdata [2][N_GP];

  assign ep_grp   = ep_raddr[GW-1:0];
  assign ep_local = local_t'(ep_raddr >> GW);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_busy <= 1'b1;
      init_addr <= '0;
    end else if (init_busy) begin
      init_addr <= init_addr + 1'b1;
      if (init_addr == AW'(GDEPTH - 1)) init_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (ep_re) ep_grp_q <= ep_grp;
    bank_q <= bank_sel;
  end

  for (genvar b = 0; b < 2; b++) begin : g_bank
    for (genvar g = 0; g < N_GP; g++) begin : g_grp
      logic          is_next;
      logic          we, re;
      logic [AW-1:0] waddr, raddr;
      wp_entry_t     wdata;

      assign is_next = (bank_sel == b[0]);

      always_comb begin
        if (init_busy) begin
          we    = 1'b1;
          waddr = init_addr;
          wdata = WP_EMPTY;
          re    = 1'b0;
          raddr = init_addr;
        end else if (is_next) begin
          we    = gp_we[g];
          waddr = AW'(gp_waddr[g]);
          wdata = gp_wdata[g];
          re    = gp_re[g];
          raddr = AW'(gp_raddr[g]);
        end else begin
          we    = ep_clr && (ep_grp == GW'(g));
          waddr = AW'(ep_local);
          wdata = WP_EMPTY;
          re    = ep_re && (ep_grp == GW'(g));
          raddr = AW'(ep_local);
        end
      end

      sync_ram #(.DEPTH(GDEPTH), .WIDTH($bits(wp_entry_t))) u_ram (
        .clk, .we, .waddr, .wdata, .re, .raddr, .rdata(rdata[b][g])
      );
    end
  end

  always_comb begin
    for (int g = 0; g < N_GP; g++) gp_rdata[g] = rdata[bank_q][g];
    ep_rdata = rdata[!bank_q][ep_grp_q];
  end

  // A group must fit the local address field of a successor entry.
  if (GDEPTH > (1 << LOCAL_W)) begin : g_size_check
    $error("word_prob_memory: N_WORDS / N_GP exceeds the local address width");
  end

  // Writes stay inside a group's address range.
  for (genvar g = 0; g < N_GP; g++) begin : g_chk
    a_gp_waddr: assert property (@(posedge clk) disable iff (!rst_n)
      gp_we[g] |-> (32'(gp_waddr[g]) < GDEPTH));
  end
endmodule
