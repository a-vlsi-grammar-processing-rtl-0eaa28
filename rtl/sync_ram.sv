// sync_ram: one-read, one-write synchronous RAM used for every memory of the
// subsystem. The read is registered: the word at raddr appears on rdata in
// the cycle after re is high, and rdata holds while re is low. A read and a
// write of the same address in one cycle return the old word. Helper of this
// design; the document gives only the memories' contents.
module sync_ram #(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned WIDTH = 32,
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end
endmodule
