// local_directory: the node's local directory (LD).
//
// The LD has one entry per shared memory block this node takes part in.
// An entry holds the block's global ID, its local chunk address and length,
// the validity of this node's copy, and a list of the other sharers: their
// network addresses and the validity of their copies. In the protocol's
// software model the LD is a doubly linked list of lists; here the outer
// list is a table of ENTRIES rows and each inner list has room for every
// other node of the mesh (unused slots have sh_used=0).
//
// Interface: a combinational lookup by global ID (lk_gid -> lk_hit, lk_idx,
// lk_entry; the lowest matching row wins) and one synchronous write port
// (we, widx, wentry) that the memory controller and the initialisation
// phase use to replace a whole row. Reset clears every row's used bit.
// An associative lookup instead of a list walk is this design's choice.
module local_directory
  import coh_pkg::*;
#(
  parameter int unsigned ENTRIES = 100
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // lookup
  input  logic [GID_W-1:0]           lk_gid,
  output logic                       lk_hit,
  output logic [$clog2(ENTRIES)-1:0] lk_idx,
  output ld_entry_t                  lk_entry,
  // write
  input  logic                       we,
  input  logic [$clog2(ENTRIES)-1:0] widx,
  input  ld_entry_t                  wentry
);

  localparam int unsigned IW = $clog2(ENTRIES);

  ld_entry_t tab [ENTRIES];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < ENTRIES; i++) tab[i] <= '0;
    end else if (we && int'(widx) < ENTRIES) begin
      tab[widx] <= wentry;
    end
  end

  always_comb begin
    lk_hit = 1'b0;
    lk_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--) begin
      if (tab[i].used && tab[i].gid == lk_gid) begin
        lk_hit = 1'b1;
        lk_idx = IW'(i);
      end
    end
    lk_entry = tab[lk_idx];
  end

endmodule
