// tb_successor_memory: loads list heads and list entries, reads them back at
// random through the processor port and checks both tables' contents and
// their one-cycle registered reads.
module tb_successor_memory;
  import grammar_pkg::*;
  localparam int unsigned N = 64, D = 256;

  logic clk = 0;
  logic head_we, list_we, head_re, list_re;
  word_t head_waddr, head_raddr;
  succ_addr_t list_waddr, list_raddr;
  succ_head_t head_wdata, head_rdata;
  succ_entry_t list_wdata, list_rdata;
  succ_head_t  hm [N];
  succ_entry_t lm [D];
  int checks = 0, failures = 0;

  successor_memory #(.N_WORDS(N), .SUCC_DEPTH(D)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    head_we = 0; list_we = 0; head_re = 0; list_re = 0;
    head_waddr = '0; list_waddr = '0; head_raddr = '0; list_raddr = '0;
    head_wdata = '0; list_wdata = '0;
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      list_we = 1; list_waddr = succ_addr_t'(i);
      list_wdata = succ_entry_t'($urandom); lm[i] = list_wdata;
      head_we = (i < N); head_waddr = word_t'(i);
      head_wdata = succ_head_t'($urandom); if (i < N) hm[i] = head_wdata;
    end
    @(negedge clk); list_we = 0; head_we = 0;
    for (int k = 0; k < 300; k++) begin
      int a, h;
      a = $urandom_range(D-1); h = $urandom_range(N-1);
      @(negedge clk);
      list_re = 1; list_raddr = succ_addr_t'(a);
      head_re = 1; head_raddr = word_t'(h);
      @(negedge clk); list_re = 0; head_re = 0;
      check(list_rdata == lm[a], "list entry");
      check(head_rdata == hm[h], "list head");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
