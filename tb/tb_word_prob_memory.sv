// tb_word_prob_memory: checks the clear after reset, that each Grammar
// Processor port reaches only its own group of the "next" bank, that the
// Epsilon port sees the other bank with word j at group j mod 4, local
// address j / 4, that its clear-on-read empties the entry, and that the
// banks trade roles when bank_sel toggles.
module tb_word_prob_memory;
  import grammar_pkg::*;
  localparam int unsigned N = 40, G = 4, GD = N / G;

  logic clk = 0, rst_n = 0, bank_sel = 0, init_busy;
  logic gp_re [G], gp_we [G];
  local_t gp_raddr [G], gp_waddr [G];
  wp_entry_t gp_rdata [G], gp_wdata [G];
  logic ep_re, ep_clr;
  word_t ep_raddr;
  wp_entry_t ep_rdata;
  wp_entry_t model [2][N];  // [bank][word]
  int checks = 0, failures = 0;

  word_prob_memory #(.N_WORDS(N), .N_GP(G)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic idle_ports();
    for (int g = 0; g < G; g++) begin
      gp_re[g] = 0; gp_we[g] = 0; gp_raddr[g] = '0; gp_waddr[g] = '0; gp_wdata[g] = '0;
    end
    ep_re = 0; ep_clr = 0; ep_raddr = '0;
  endtask

  // read word j of the "current" bank through the epsilon port
  task automatic ep_read(int j, bit clr, output wp_entry_t e);
    @(negedge clk); ep_re = 1; ep_clr = clr; ep_raddr = word_t'(j);
    @(negedge clk); ep_re = 0; ep_clr = 0;
    e = ep_rdata;
  endtask

  // read word j of the "next" bank through its group's processor port
  task automatic gp_read(int j, output wp_entry_t e);
    @(negedge clk); gp_re[j % G] = 1; gp_raddr[j % G] = local_t'(j / G);
    @(negedge clk); gp_re[j % G] = 0;
    e = gp_rdata[j % G];
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wp_entry_t e;
    int cyc;
    idle_ports();
    repeat (2) @(negedge clk);
    rst_n = 1;
    cyc = 0;
    while (init_busy) begin @(negedge clk); cyc++; end
    check(cyc >= GD && cyc <= GD + 1, "clear takes one cycle per group address");
    for (int b = 0; b < 2; b++) for (int j = 0; j < N; j++) model[b][j] = WP_EMPTY;
    for (int round = 0; round < 4; round++) begin
      int nb;
      nb = bank_sel ? 1 : 0;
      // every entry of both banks matches the model
      for (int j = 0; j < N; j++) begin
        gp_read(j, e);  check(e == model[nb][j], "next bank via processor port");
        ep_read(j, 0, e); check(e == model[1-nb][j], "current bank via epsilon port");
      end
      // all four processors write one entry each per cycle
      for (int k = 0; k < 30; k++) begin
        @(negedge clk);
        for (int g = 0; g < G; g++) begin
          int l;
          l = $urandom_range(GD-1);
          gp_we[g] = 1; gp_waddr[g] = local_t'(l);
          gp_wdata[g] = wp_entry_t'({$urandom, $urandom});
          model[nb][l*G+g] = gp_wdata[g];
        end
      end
      @(negedge clk); for (int g = 0; g < G; g++) gp_we[g] = 0;
      // read-and-clear the current bank
      for (int j = 0; j < N; j++) begin
        ep_read(j, 1, e);
        check(e == model[1-nb][j], "read before clear");
        model[1-nb][j] = WP_EMPTY;
        ep_read(j, 0, e);
        check(e == WP_EMPTY, "cleared");
      end
      @(negedge clk); bank_sel = !bank_sel;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
