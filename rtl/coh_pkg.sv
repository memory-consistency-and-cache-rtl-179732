// coh_pkg: types and constants shared by the coherence-protocol blocks.
//
// The system is a 2x2 mesh of nodes. Every node holds a slice of the
// distributed shared memory, a local directory (LD) that names the sharers
// of each shared memory block it takes part in, and a memory controller (MC)
// that keeps the copies coherent by exchanging protocol messages through the
// network interface (NI).
//
// Flits are 40 bits wide. The field positions of header, data-body and tail
// flits, and of the protocol word carried in the first data-body flit
// (P_TYPE, P_GID, P_EXTENSION), follow the published flit formats. The
// numeric codes of the flit types and protocol message types are this
// design's own choice; so are the block-size limit and address widths.
package coh_pkg;

  // ---------------------------------------------------------------- system
  localparam int unsigned N_X     = 2;            // mesh columns
  localparam int unsigned N_Y     = 2;            // mesh rows
  localparam int unsigned N_NODES = N_X * N_Y;
  localparam int unsigned NODE_W  = $clog2(N_NODES);
  localparam int unsigned N_SH    = N_NODES - 1;  // sharer slots per LD entry

  // ------------------------------------------------------------- data sizes
  localparam int unsigned CHUNK_W   = 32;         // memory is kept in 32-bit chunks
  localparam int unsigned MAX_WORDS = 4;          // largest block, in chunks
  localparam int unsigned LEN_W     = $clog2(MAX_WORDS + 1);
  localparam int unsigned ADDR_W    = 12;         // chunk address in shared memory
  localparam int unsigned GID_W     = 17;         // global ID of a shared block
  localparam int unsigned PEXT_W    = 11;         // protocol extension field

  // ------------------------------------------------------------ flit format
  localparam int unsigned FLIT_W = 40;

  typedef enum logic [3:0] {
    FT_HEADER = 4'd1,
    FT_BODY   = 4'd2,
    FT_TAIL   = 4'd3
  } flit_type_e;

  // Header flit: TYP[39:36] ID[35:32] SX SY SZ DX DY DZ EX1 EX2 (4 bits each)
  typedef struct packed {
    flit_type_e typ;
    logic [3:0] id;
    logic [3:0] sx, sy, sz;
    logic [3:0] dx, dy, dz;
    logic [3:0] ex1, ex2;
  } hdr_flit_t;

  // Data-body and tail flit: TYP[39:36] ID[35:32] DATA/EXTENSION[31:0]
  typedef struct packed {
    flit_type_e  typ;
    logic [3:0]  id;
    logic [31:0] data;
  } body_flit_t;

  // Protocol word in the first data-body flit:
  // P_TYPE[31:28] P_GID[27:11] P_EXTENSION[10:0]
  typedef enum logic [3:0] {
    P_NONE        = 4'd0,
    P_TOKEN_REQ   = 4'd1,   // invalidate your copy, send me your token
    P_TOKEN_RESP  = 4'd2,   // token (acknowledgement of invalidation)
    P_WRITE_OK    = 4'd3,   // sender finished a write, only it is valid
    P_READ_REQ    = 4'd4,   // send me the block
    P_UPDATE      = 4'd5,   // read finished (ext[0]=1: sender is valid now)
    P_READ_DATA   = 4'd6,   // block data follows in further body flits
    P_READ_NACK   = 4'd7    // read refused, a write is in progress here
  } ptype_e;

  typedef struct packed {
    ptype_e              ptype;
    logic [GID_W-1:0]    gid;
    logic [PEXT_W-1:0]   ext;
  } pword_t;

  typedef logic [NODE_W-1:0] node_t;

  // A message as seen by the memory controller. A message is one packet:
  // header, protocol body, nwords data bodies, tail.
  typedef struct packed {
    node_t                            peer;   // destination (tx) / source (rx)
    ptype_e                           ptype;
    logic [GID_W-1:0]                 gid;
    logic [PEXT_W-1:0]                ext;
    logic [LEN_W-1:0]                 nwords;
    logic [MAX_WORDS-1:0][CHUNK_W-1:0] data;
  } msg_t;

  // --------------------------------------------------------- local directory
  // One LD entry: the header (block GID, local physical address, length,
  // own validity) followed by the list of the other sharers with their
  // network addresses and validity.
  typedef struct packed {
    logic                   used;
    logic [GID_W-1:0]       gid;
    logic [ADDR_W-1:0]      addr;
    logic [LEN_W-1:0]       len;
    logic                   valid;
    logic [N_SH-1:0]        sh_used;
    node_t [N_SH-1:0]       sh_node;
    logic [N_SH-1:0]        sh_valid;
  } ld_entry_t;

  // -------------------------------------------------- processing element port
  typedef enum logic {
    OP_READ  = 1'b0,
    OP_WRITE = 1'b1
  } op_e;

  typedef enum logic {
    ST_DONE   = 1'b0,
    ST_CANCEL = 1'b1
  } status_e;

  typedef struct packed {
    op_e                               op;
    logic [GID_W-1:0]                  gid;
    logic [MAX_WORDS-1:0][CHUNK_W-1:0] data;
  } pe_req_t;

  typedef struct packed {
    op_e                               op;
    logic [GID_W-1:0]                  gid;
    status_e                           status;
    logic [MAX_WORDS-1:0][CHUNK_W-1:0] data;
  } pe_rsp_t;

  // One-cycle event pulses of a memory controller, for counting protocol
  // activity (read hits, remote reads, token exchanges, cancellations...).
  typedef struct packed {
    logic read_hit;        // PE read served from a valid local copy
    logic read_remote;     // PE read missed, read request sent to a sharer
    logic read_done;       // remote read finished, data stored locally
    logic read_cancel;     // PE read cancelled
    logic read_served;     // block data sent to a requesting node
    logic read_nack;       // read request refused (write in progress here)
    logic write_start;     // write granted locally, lock taken, tokens asked
    logic write_done;      // write performed after all tokens arrived
    logic write_cancel;    // PE write cancelled (busy entry)
    logic write_invalid;   // PE write refused because the copy is Invalid
    logic invalidated;     // token request obeyed: own copy invalidated
    logic token_deferred;  // token held until a reader's UPDATE arrives
    logic token_withheld;  // token request from lower-priority writer held back
    logic write_yield;     // own write abandoned for a higher-priority writer
    logic stale_drop;      // message for an operation no longer pending
  } mc_ev_t;

  // Mesh coordinates of a node index: node "xy" has index x*N_Y + y.
  function automatic logic [3:0] node_x(node_t n);
    return 4'(int'(n) / N_Y);
  endfunction

  function automatic logic [3:0] node_y(node_t n);
    return 4'(int'(n) % N_Y);
  endfunction

  function automatic node_t coord_node(logic [3:0] x, logic [3:0] y);
    return node_t'(int'(x) * N_Y + int'(y));
  endfunction

endpackage
