// noc_model: behavioural stand-in for the 2x2 mesh network, for simulation
// only. It is not part of the design: the real network is an existing
// router mesh.
//
// Each sender's packet goes, flit by flit, to the node named in its header
// (DX, DY). The packet holds its route until its tail flit. Each receiver
// takes at most one flit per cycle; when several senders have a flit for the
// same receiver, they take turns round-robin, so packets of different
// senders interleave flit by flit at the receiver, while the flits of one
// sender stay in order. With STALL_PCT > 0 a receiver link is randomly
// unavailable in that percentage of cycles. Flits are never dropped.
// The routers of the real system come from an existing network-on-chip;
// this model only keeps the delivery guarantees the protocol relies on
// (in-order delivery per sender, no loss). Its arbitration and stalls are
// this testbench's own.
module noc_model
  import coh_pkg::*;
#(
  parameter int unsigned STALL_PCT = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FLIT_W-1:0] src_flit  [N_NODES],
  input  logic              src_valid [N_NODES],
  output logic              src_ready [N_NODES],
  output logic [FLIT_W-1:0] dst_flit  [N_NODES],
  output logic              dst_valid [N_NODES],
  input  logic              dst_ready [N_NODES]
);

  node_t cur_dst [N_NODES];   // route of the packet a sender is sending
  node_t target  [N_NODES];
  node_t rr      [N_NODES];   // round-robin pointer per receiver
  logic  busy    [N_NODES];   // receiver link unavailable this cycle
  logic  grant_v [N_NODES];
  node_t grant_s [N_NODES];

  always_comb begin
    for (int s = 0; s < N_NODES; s++) begin
      hdr_flit_t h;
      h = hdr_flit_t'(src_flit[s]);
      target[s] = (h.typ == FT_HEADER) ? coord_node(h.dx, h.dy) : cur_dst[s];
    end
    for (int d = 0; d < N_NODES; d++) begin
      grant_v[d] = 1'b0;
      grant_s[d] = '0;
      for (int i = N_NODES - 1; i >= 0; i--) begin
        int s;
        s = (int'(rr[d]) + i) % N_NODES;
        if (src_valid[s] && target[s] == node_t'(d)) begin
          grant_v[d] = 1'b1;
          grant_s[d] = node_t'(s);
        end
      end
      if (busy[d]) grant_v[d] = 1'b0;
      dst_valid[d] = grant_v[d];
      dst_flit[d]  = src_flit[grant_s[d]];
    end
    for (int s = 0; s < N_NODES; s++) begin
      src_ready[s] = grant_v[target[s]] && grant_s[target[s]] == node_t'(s)
                     && dst_ready[target[s]];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_NODES; i++) begin
        cur_dst[i] <= '0;
        rr[i]      <= '0;
        busy[i]    <= 1'b0;
      end
    end else begin
      for (int s = 0; s < N_NODES; s++)
        if (src_valid[s] && src_ready[s]) cur_dst[s] <= target[s];
      for (int d = 0; d < N_NODES; d++) begin
        if (grant_v[d] && dst_ready[d]) rr[d] <= grant_s[d] + 1'b1;
        busy[d] <= (STALL_PCT > 0) && (($urandom % 100) < STALL_PCT);
      end
    end
  end

endmodule
