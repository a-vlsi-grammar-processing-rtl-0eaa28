// tb_pgo_fifo: random pushes and pops against a queue model. Checks the
// order and contents of every entry, the full and empty flags and the fill
// count, and that a full FIFO is reached and drained.
module tb_pgo_fifo;
  import grammar_pkg::*;
  localparam int unsigned DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic push, pop, full, empty;
  pgo_entry_t din, dout;
  logic [3:0] count;
  int checks = 0, failures = 0, saw_full = 0;
  pgo_entry_t model [$];

  pgo_fifo #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = !clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // bias: fill during the first part of each 200-cycle window, drain later
      @(negedge clk);
      check(empty == (model.size() == 0), "empty flag");
      check(full == (model.size() == DEPTH), "full flag");
      check(int'(count) == model.size(), "count");
      if (model.size() > 0) check(dout == model[0], "head entry");
      if (full) saw_full++;
      push = !full && ($urandom_range(99) < ((cyc % 200) < 100 ? 80 : 20));
      pop  = !empty && ($urandom_range(99) < ((cyc % 200) < 100 ? 20 : 80));
      din  = pgo_entry_t'({$urandom, $urandom});
      @(posedge clk);
      #1;
      if (pop) void'(model.pop_front());
      if (push) model.push_back(din);
    end
    check(saw_full > 0, "full reached");
    $display("full seen in %0d cycles", saw_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
