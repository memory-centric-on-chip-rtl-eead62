// borrow_mem: the part of a node's distributed memory that the d-MMU may
// lend to the network interface, i.e. the memory blocks behind the last way
// of the cache tables in bank 0 and bank 1.
//
// It holds NUM_BLOCKS blocks of 8 32-bit words. A whole block is written in
// one cycle (the largest packet payload fits one block) and a whole block is
// read back with one cycle of latency: rd_data is valid the cycle after
// rd_en. One write port and one read port work in the same cycle. Block
// size and count (2 banks x 256 entries = 512 valid bits) follow the d-MMU
// organisation; the separate read and write ports are this design's choice.
// The array has no reset: a block is only read after it was written.
module borrow_mem #(
  parameter int unsigned NUM_BLOCKS = 512,
  parameter int unsigned BLOCK_W    = 256
) (
  input  logic                          clk,
  input  logic                          wr_en,
  input  logic [$clog2(NUM_BLOCKS)-1:0] wr_addr,
  input  logic [BLOCK_W-1:0]            wr_data,
  input  logic                          rd_en,
  input  logic [$clog2(NUM_BLOCKS)-1:0] rd_addr,
  output logic [BLOCK_W-1:0]            rd_data
);
  logic [BLOCK_W-1:0] mem [NUM_BLOCKS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
