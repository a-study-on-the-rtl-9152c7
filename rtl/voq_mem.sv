// voq_mem: dual-port cell memory of one input port.
//
// All N virtual output queues of an input port share this memory, which is
// statically divided into N regions of DEPTH cells (address = {queue, slot}).
// It has one write port, used by arriving cells, and one read port, used by
// departing cells, so a cell can arrive and another leave in the same clock,
// as the switch requires.  The read is synchronous: rdata holds the word
// addressed on the clock where re was 1, from the next clock on, until the
// next read.  Reading and writing the same address in one clock is not done
// by the input port and returns the old word.
module voq_mem #(
  parameter int unsigned ADDR_W = 14,
  parameter int unsigned DATA_W = switch_pkg::DEF_CELL_W
) (
  input  logic              clk,
  input  logic              we,
  input  logic [ADDR_W-1:0] waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic              re,
  input  logic [ADDR_W-1:0] raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
