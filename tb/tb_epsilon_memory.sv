// tb_epsilon_memory: writes every word of a small table, then reads all of
// them back in random order, checking the one-cycle read latency, that the
// output holds while the read enable is low, and read-before-write.
module tb_epsilon_memory;
  import grammar_pkg::*;
  localparam int unsigned N = 100;

  logic clk = 0;
  logic we, re;
  word_t waddr, raddr;
  prob_t wdata, rdata;
  prob_t model [N];
  int checks = 0, failures = 0;

  epsilon_memory #(.N_WORDS(N)) dut (.*);

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
    we = 0; re = 0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      we = 1; waddr = word_t'(i); wdata = prob_t'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 0;
    for (int k = 0; k < 300; k++) begin
      int a;
      a = $urandom_range(N-1);
      @(negedge clk); re = 1; raddr = word_t'(a);
      @(negedge clk); re = 0;
      check(rdata == model[a], "read data");
      @(negedge clk);
      check(rdata == model[a], "read data held");
    end
    // read and write of the same word in one cycle return the old value
    @(negedge clk); re = 1; we = 1; raddr = 5; waddr = 5; wdata = ~model[5];
    @(negedge clk); re = 0; we = 0;
    check(rdata == model[5], "read before write");
    model[5] = ~model[5];
    @(negedge clk); re = 1; raddr = 5;
    @(negedge clk); re = 0;
    check(rdata == model[5], "written value");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
