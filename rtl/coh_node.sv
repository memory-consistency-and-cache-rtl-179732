// coh_node: one node of the mesh as seen by the coherence protocol.
//
// A node joins the memory controller (MC), the local directory (LD), the
// node's slice of shared memory and the two halves of the network interface
// (NI): ni_rx rebuilds incoming packets into messages for the MC, ni_tx turns
// the MC's messages into packets. The MC takes requests from the node's
// processing element (PE) and answers them. The router of the node is not
// part of this block: the flit ports connect to it.
//
// Initialisation: before operation, init_ld_we writes an LD row (which
// blocks this node shares, with whom, where they sit locally) and
// init_sm_we writes a shared-memory chunk. Both take precedence over the MC
// in the cycle they are used; they are meant to be used only while the PE
// and the network are quiet. The split into MC, LD, shared memory and NI
// follows the protocol description; the initialisation ports are this
// design's own.
module coh_node
  import coh_pkg::*;
#(
  parameter int unsigned NODE_ID  = 0,
  parameter int unsigned ENTRIES  = 100,
  parameter int unsigned SM_WORDS = 512,
  parameter int unsigned RX_DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processing element
  input  pe_req_t                    pe_req,
  input  logic                       pe_req_valid,
  output logic                       pe_req_ready,
  output pe_rsp_t                    pe_rsp,
  output logic                       pe_rsp_valid,
  // router port
  output logic [FLIT_W-1:0]          flit_out,
  output logic                       flit_out_valid,
  input  logic                       flit_out_ready,
  input  logic [FLIT_W-1:0]          flit_in,
  input  logic                       flit_in_valid,
  output logic                       flit_in_ready,
  // initialisation
  input  logic                       init_ld_we,
  input  logic [$clog2(ENTRIES)-1:0] init_ld_idx,
  input  ld_entry_t                  init_ld_entry,
  input  logic                       init_sm_we,
  input  logic [ADDR_W-1:0]          init_sm_addr,
  input  logic [CHUNK_W-1:0]         init_sm_wdata,
  // status
  output mc_ev_t                     ev,
  output logic                       rx_overflow
);

  localparam int unsigned IW = $clog2(ENTRIES);

  msg_t             rx_msg, tx_msg;
  logic             rx_valid, rx_ready, tx_valid, tx_ready;

  logic [GID_W-1:0] ld_gid;
  logic             ld_hit;
  logic [IW-1:0]    ld_idx;
  ld_entry_t        ld_entry;
  logic             mc_ld_we, ld_we;
  logic [IW-1:0]    mc_ld_widx, ld_widx;
  ld_entry_t        mc_ld_wentry, ld_wentry;

  logic               mc_sm_we, sm_we;
  logic [ADDR_W-1:0]  mc_sm_addr, sm_addr;
  logic [CHUNK_W-1:0] mc_sm_wdata, sm_wdata, sm_rdata;

  assign ld_we     = init_ld_we | mc_ld_we;
  assign ld_widx   = init_ld_we ? init_ld_idx   : mc_ld_widx;
  assign ld_wentry = init_ld_we ? init_ld_entry : mc_ld_wentry;

  assign sm_we     = init_sm_we | mc_sm_we;
  assign sm_addr   = init_sm_we ? init_sm_addr  : mc_sm_addr;
  assign sm_wdata  = init_sm_we ? init_sm_wdata : mc_sm_wdata;

  ni_rx #(.DEPTH(RX_DEPTH)) u_rx (
    .clk, .rst_n,
    .flit(flit_in), .flit_valid(flit_in_valid), .flit_ready(flit_in_ready),
    .msg(rx_msg), .msg_valid(rx_valid), .msg_ready(rx_ready),
    .overflow_err(rx_overflow)
  );

  ni_tx #(.NODE_ID(NODE_ID)) u_tx (
    .clk, .rst_n,
    .msg(tx_msg), .msg_valid(tx_valid), .msg_ready(tx_ready),
    .flit(flit_out), .flit_valid(flit_out_valid), .flit_ready(flit_out_ready)
  );

  local_directory #(.ENTRIES(ENTRIES)) u_ld (
    .clk, .rst_n,
    .lk_gid(ld_gid), .lk_hit(ld_hit), .lk_idx(ld_idx), .lk_entry(ld_entry),
    .we(ld_we), .widx(ld_widx), .wentry(ld_wentry)
  );

  shared_memory #(.WORDS(SM_WORDS)) u_sm (
    .clk, .we(sm_we), .addr(sm_addr), .wdata(sm_wdata), .rdata(sm_rdata)
  );

  memory_controller #(.NODE_ID(NODE_ID), .ENTRIES(ENTRIES)) u_mc (
    .clk, .rst_n,
    .pe_req, .pe_req_valid, .pe_req_ready, .pe_rsp, .pe_rsp_valid,
    .rx_msg, .rx_valid, .rx_ready,
    .tx_msg, .tx_valid, .tx_ready,
    .ld_gid, .ld_hit, .ld_idx, .ld_entry,
    .ld_we(mc_ld_we), .ld_widx(mc_ld_widx), .ld_wentry(mc_ld_wentry),
    .sm_we(mc_sm_we), .sm_addr(mc_sm_addr), .sm_wdata(mc_sm_wdata),
    .sm_rdata,
    .ev
  );

endmodule
