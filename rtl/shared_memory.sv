// shared_memory: the node's slice of the distributed shared memory.
//
// Shared memory blocks are stored as whole 32-bit chunks: a block of 31 bits
// takes one chunk, a block of 55 bits takes two. The local directory records
// where a block starts (chunk address) and how many chunks it has; this
// memory only stores the chunks. One port, synchronous: a write happens at
// the clock edge when we=1; rdata shows the chunk at addr one cycle after
// addr was presented (read-before-write on the same address).
// The 32-bit chunk follows the protocol description; the depth is this
// design's own choice.
module shared_memory
  import coh_pkg::*;
#(
  parameter int unsigned WORDS = 512
) (
  input  logic               clk,
  input  logic               we,
  input  logic [ADDR_W-1:0]  addr,
  input  logic [CHUNK_W-1:0] wdata,
  output logic [CHUNK_W-1:0] rdata
);

  localparam int unsigned AW = $clog2(WORDS);

  logic [CHUNK_W-1:0] mem [WORDS];

  always_ff @(posedge clk) begin
    if (we) mem[addr[AW-1:0]] <= wdata;
    rdata <= mem[addr[AW-1:0]];
  end

endmodule
