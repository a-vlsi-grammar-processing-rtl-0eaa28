// pgo_fifo: receiving FIFO between the word processing subsystem and one
// processor of the grammar subsystem. Every word that ends in a frame is
// pushed, with its probability PGO and backtrace pointer, into all receiving
// FIFOs at once, so each processor reads its own copy at its own pace.
//
// Interface: push/din/full on the write side, pop/dout/empty on the read
// side. dout shows the oldest entry while empty is low (first-word
// fall-through); pop takes it. A push while full and a pop while empty are
// ignored (and flagged by assertions). count is the fill level.
// The document gives the FIFOs' role; depth, handshake and fall-through
// read are this design's choices.
module pgo_fifo
  import grammar_pkg::*;
#(
  parameter int unsigned DEPTH = 64,  // power of two
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  pgo_entry_t din,
  output logic       full,
  input  logic       pop,
  output pgo_entry_t dout,
  output logic       empty,
  output logic [AW:0] count
);
  pgo_entry_t mem [DEPTH];
  logic [AW:0] wptr, rptr;
  logic do_push, do_pop;

  assign count   = wptr - rptr;
  assign full    = (count == (AW+1)'(DEPTH));
  assign empty   = (count == '0);
  assign do_push = push && !full;
  assign do_pop  = pop && !empty;
  assign dout    = mem[rptr[AW-1:0]];

  always_ff @(posedge clk) begin
    if (do_push) mem[wptr[AW-1:0]] <= din;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (do_push) wptr <= wptr + 1'b1;
      if (do_pop)  rptr <= rptr + 1'b1;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> !empty);
endmodule
