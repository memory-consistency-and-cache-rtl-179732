// coh_top: the coherence protocol on a 2x2 mesh of nodes.
//
// Four nodes (index x*2+y for node "xy": 00, 01, 10, 11) each hold a slice
// of the distributed shared memory, a local directory and a memory
// controller, and talk through their network interfaces. Every node's
// processing-element port, initialisation port and router port is brought
// out as an array indexed by node. The mesh routers themselves come from an
// existing network-on-chip and are not part of this design: whatever drives
// flit_in from flit_out must deliver the packets of one sender to one
// receiver in order, must not drop flits and may interleave packets of
// different senders flit by flit.
//
// Initialisation writes the directory rows and the shared-memory chunks of
// node init_node; it is meant to be done after reset and before the first
// PE request. Everything else is as in coh_node.
module coh_top
  import coh_pkg::*;
#(
  parameter int unsigned ENTRIES  = 100,
  parameter int unsigned SM_WORDS = 512,
  parameter int unsigned RX_DEPTH = 8
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processing elements
  input  pe_req_t                    pe_req        [N_NODES],
  input  logic                       pe_req_valid  [N_NODES],
  output logic                       pe_req_ready  [N_NODES],
  output pe_rsp_t                    pe_rsp        [N_NODES],
  output logic                       pe_rsp_valid  [N_NODES],
  // router ports
  output logic [FLIT_W-1:0]          flit_out       [N_NODES],
  output logic                       flit_out_valid [N_NODES],
  input  logic                       flit_out_ready [N_NODES],
  input  logic [FLIT_W-1:0]          flit_in        [N_NODES],
  input  logic                       flit_in_valid  [N_NODES],
  output logic                       flit_in_ready  [N_NODES],
  // initialisation
  input  node_t                      init_node,
  input  logic                       init_ld_we,
  input  logic [$clog2(ENTRIES)-1:0] init_ld_idx,
  input  ld_entry_t                  init_ld_entry,
  input  logic                       init_sm_we,
  input  logic [ADDR_W-1:0]          init_sm_addr,
  input  logic [CHUNK_W-1:0]         init_sm_wdata,
  // status
  output mc_ev_t                     ev            [N_NODES],
  output logic                       rx_overflow   [N_NODES]
);

  for (genvar n = 0; n < N_NODES; n++) begin : g_node
    coh_node #(
      .NODE_ID (n),
      .ENTRIES (ENTRIES),
      .SM_WORDS(SM_WORDS),
      .RX_DEPTH(RX_DEPTH)
    ) u_node (
      .clk, .rst_n,
      .pe_req        (pe_req[n]),
      .pe_req_valid  (pe_req_valid[n]),
      .pe_req_ready  (pe_req_ready[n]),
      .pe_rsp        (pe_rsp[n]),
      .pe_rsp_valid  (pe_rsp_valid[n]),
      .flit_out      (flit_out[n]),
      .flit_out_valid(flit_out_valid[n]),
      .flit_out_ready(flit_out_ready[n]),
      .flit_in       (flit_in[n]),
      .flit_in_valid (flit_in_valid[n]),
      .flit_in_ready (flit_in_ready[n]),
      .init_ld_we    (init_ld_we && init_node == node_t'(n)),
      .init_ld_idx,
      .init_ld_entry,
      .init_sm_we    (init_sm_we && init_node == node_t'(n)),
      .init_sm_addr,
      .init_sm_wdata,
      .ev            (ev[n]),
      .rx_overflow   (rx_overflow[n])
    );
  end

endmodule
