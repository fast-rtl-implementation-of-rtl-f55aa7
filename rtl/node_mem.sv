// node_mem: the grid-map memory of the A* accelerator.
//
// One record (astar_pkg::node_t: parent X,Y, G cost, closed and obstacle flags)
// per map node, addressed by {y, x}. It is a simple dual-port RAM of the kind an
// FPGA block RAM provides: one write port and one read port that can both be
// used in every cycle. The read is synchronous: the record addressed in cycle t
// is on rd_data in cycle t+1. A read and a write of the same address in the same
// cycle return the old record. The memory is not reset; the host writes every
// record before a search.
// The record fields follow the accelerator's memory layout; the port
// arrangement and the read latency are this design's choices.
module node_mem
  import astar_pkg::*;
#(
  parameter int AW = 2 * CW                  // address bits: 65536 nodes
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] wr_addr,
  input  node_t         wr_data,
  input  logic          re,
  input  logic [AW-1:0] rd_addr,
  output node_t         rd_data
);

  node_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (re) rd_data <= mem[rd_addr];
  end

endmodule
