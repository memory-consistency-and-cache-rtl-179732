// memory_controller: the node's coherence engine for shared memory (MC).
//
// The MC serves read and write requests of the local processing element
// (PE) on shared memory blocks, and interprets the protocol messages that
// arrive from the other nodes. It keeps the local directory (LD) and the
// shared memory up to date and sends messages through the network interface.
// Each block copy is Valid or Invalid: a write by another node invalidates
// it, a read of a valid copy makes it Valid again.
//
// PE read:  a valid local copy is returned at once (read hit). An invalid
//   copy is fetched: a READ_REQ goes to the first sharer in the LD list that
//   is marked valid; the returned data is stored, the copy becomes Valid, and
//   every sharer is told (UPDATE) that this node is valid too. Reads never
//   lock a block.
// PE write: refused if the local copy is Invalid. Otherwise the block is
//   locked, a TOKEN_REQ is sent to every sharer, and the write data waits
//   until one TOKEN_RESP per sharer has come back. Then the data is written,
//   the lock is released, and WRITE_OK tells all sharers that only this node
//   is valid.
// Incoming TOKEN_REQ: the local copy is invalidated and the token is sent
//   back. When two nodes write the same block at once, node priority settles
//   it: a lower node index is higher priority. A locked node holds back the
//   token of a lower-priority writer and gives up (cancels) its own write when
//   the request comes from a higher-priority writer.
// Incoming READ_REQ: the block is sent back (READ_DATA, 4+ flits). Until
//   the requester's UPDATE arrives, local writes of the block are refused and
//   a token asked by a remote writer is held back (the copy is invalidated at
//   once, the token follows the UPDATE), so that no write can complete while
//   old data is on its way to a reader. A node that is writing the block, or whose copy is Invalid, answers
//   READ_NACK and the requester cancels its read.
// A second request of the same kind on a block whose operation is still
//   pending is cancelled, as are reads that meet a write in progress.
//
// The read/write rules, tokens, lock, UPDATE and WRITE_OK messages and the
// priority idea come from the protocol description. The READ_NACK message,
// the UPDATE extension bit, the deferred token, the "poisoning" of a read that meets an invalidation, and
// the choice of the lower index as higher priority are this design's own.
//
// Interfaces: PE requests (pe_req/pe_req_valid/pe_req_ready) and one-cycle
// responses (pe_rsp/pe_rsp_valid), each naming op and GID; messages from and
// to the network interface with valid/ready; a combinational LD lookup and a
// registered LD row write; a synchronous shared-memory port. Incoming
// messages take precedence over new PE requests. The controller handles one
// request or message at a time: a lookup cycle, then two cycles per chunk
// read from shared memory or one per chunk written, then one cycle per
// message sent (each waits for the NI to accept it).
// In the node with the highest index no writer has lower priority, so its
// priority comparison is constant and its token_withheld event never fires;
// the tools report that comparison and that output bit as constant.
module memory_controller
  import coh_pkg::*;
#(
  parameter int unsigned NODE_ID = 0,
  parameter int unsigned ENTRIES = 100
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // processing element
  input  pe_req_t                    pe_req,
  input  logic                       pe_req_valid,
  output logic                       pe_req_ready,
  output pe_rsp_t                    pe_rsp,
  output logic                       pe_rsp_valid,
  // network interface
  input  msg_t                       rx_msg,
  input  logic                       rx_valid,
  output logic                       rx_ready,
  output msg_t                       tx_msg,
  output logic                       tx_valid,
  input  logic                       tx_ready,
  // local directory
  output logic [GID_W-1:0]           ld_gid,
  input  logic                       ld_hit,
  input  logic [$clog2(ENTRIES)-1:0] ld_idx,
  input  ld_entry_t                  ld_entry,
  output logic                       ld_we,
  output logic [$clog2(ENTRIES)-1:0] ld_widx,
  output ld_entry_t                  ld_wentry,
  // shared memory
  output logic                       sm_we,
  output logic [ADDR_W-1:0]          sm_addr,
  output logic [CHUNK_W-1:0]         sm_wdata,
  input  logic [CHUNK_W-1:0]         sm_rdata,
  // activity
  output mc_ev_t                     ev
);

  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned TW = $clog2(N_SH + 1);
  localparam int unsigned SW = (N_SH > 1) ? $clog2(N_SH) : 1;

  typedef logic [MAX_WORDS-1:0][CHUNK_W-1:0] block_t;

  typedef enum logic [2:0] {
    S_IDLE, S_DECIDE, S_RD, S_RD_W, S_WR, S_SEND, S_BCAST
  } state_e;

  typedef enum logic [1:0] {
    A_PE_RSP,      // after a local read: answer the PE
    A_SEND_DATA,   // after a local read: send READ_DATA to the requester
    A_COMMIT,      // after writing: finish a PE write
    A_FILL         // after writing: finish a remote read
  } after_e;

  // ------------------------------------------------------------ block state
  logic              lock     [ENTRIES];  // write in progress
  logic [TW-1:0]     tok_cnt  [ENTRIES];  // tokens still expected
  logic              rd_pend  [ENTRIES];  // remote read in progress
  logic              rd_poison[ENTRIES];  // invalidated while reading
  logic [N_SH-1:0]   serving  [ENTRIES];  // data sent, UPDATE awaited
  logic [N_SH-1:0]   owed     [ENTRIES];  // tokens deferred until UPDATE
  block_t            wbuf     [ENTRIES];  // data of the pending write

  // ------------------------------------------------------------ working set
  state_e            state;
  after_e            after;
  logic              from_pe;
  pe_req_t           cur_req;
  msg_t              cur_msg;
  logic [IW-1:0]     cur_idx;
  ld_entry_t         cur_e;
  logic [SW-1:0]     cur_slot;
  block_t            rbuf;      // data read from shared memory
  block_t            wsrc;      // data to be written to shared memory
  logic [LEN_W-1:0]  k;         // chunk counter
  logic [SW-1:0]     bslot;     // broadcast slot counter
  logic [N_SH-1:0]   bmask;     // broadcast to these sharer slots
  ptype_e            bc_ptype;
  logic [PEXT_W-1:0] bc_ext;
  msg_t              tx_r;

  // --------------------------------------------------------------- lookups
  logic [GID_W-1:0]  cur_gid;
  node_t             cur_peer;
  logic              peer_found;
  logic [SW-1:0]     peer_slot;
  logic              fv_found;    // a sharer marked valid exists
  logic [SW-1:0]     fv_slot;     // first such sharer in list order
  logic [TW-1:0]     n_sharers;

  assign cur_gid  = from_pe ? cur_req.gid : cur_msg.gid;
  assign cur_peer = cur_msg.peer;
  assign ld_gid   = cur_gid;

  always_comb begin
    peer_found = 1'b0;
    peer_slot  = '0;
    fv_found   = 1'b0;
    fv_slot    = '0;
    n_sharers  = '0;
    for (int s = N_SH - 1; s >= 0; s--) begin
      if (ld_entry.sh_used[s] && ld_entry.sh_node[s] == cur_peer) begin
        peer_found = 1'b1;
        peer_slot  = SW'(s);
      end
      if (ld_entry.sh_used[s] && ld_entry.sh_valid[s]) begin
        fv_found = 1'b1;
        fv_slot  = SW'(s);
      end
    end
    for (int s = 0; s < N_SH; s++) n_sharers += TW'(ld_entry.sh_used[s]);
  end

  // ------------------------------------------------------- outward signals
  assign pe_req_ready = (state == S_IDLE) && !rx_valid;
  assign rx_ready     = (state == S_IDLE);

  always_comb begin
    tx_msg   = tx_r;
    tx_valid = 1'b0;
    if (state == S_SEND) tx_valid = 1'b1;
    if (state == S_BCAST) begin
      tx_valid       = bmask[bslot];
      tx_msg         = '0;
      tx_msg.peer    = cur_e.sh_node[bslot];
      tx_msg.ptype   = bc_ptype;
      tx_msg.gid     = cur_e.gid;
      tx_msg.ext     = bc_ext;
    end
  end

  assign sm_addr  = cur_e.addr + ADDR_W'(k);
  assign sm_we    = (state == S_WR);
  assign sm_wdata = wsrc[k];

  // Row images written back to the LD.
  function automatic ld_entry_t with_peer_valid(ld_entry_t e, logic [SW-1:0] s);
    ld_entry_t r = e;
    r.sh_valid[s] = 1'b1;
    return r;
  endfunction

  // ------------------------------------------------------------ main FSM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      after        <= A_PE_RSP;
      from_pe      <= 1'b0;
      cur_req      <= '0;
      cur_msg      <= '0;
      cur_idx      <= '0;
      cur_e        <= '0;
      cur_slot     <= '0;
      rbuf         <= '0;
      wsrc         <= '0;
      k            <= '0;
      bslot        <= '0;
      bmask        <= '0;
      bc_ptype     <= P_NONE;
      bc_ext       <= '0;
      tx_r         <= '0;
      pe_rsp       <= '0;
      pe_rsp_valid <= 1'b0;
      ld_we        <= 1'b0;
      ld_widx      <= '0;
      ld_wentry    <= '0;
      ev           <= '0;
      for (int i = 0; i < ENTRIES; i++) begin
        lock[i]      <= 1'b0;
        tok_cnt[i]   <= '0;
        rd_pend[i]   <= 1'b0;
        rd_poison[i] <= 1'b0;
        serving[i]   <= '0;
        owed[i]      <= '0;
        wbuf[i]      <= '0;
      end
    end else begin
      pe_rsp_valid <= 1'b0;
      ld_we        <= 1'b0;
      ev           <= '0;

      unique case (state)
        // ---------------------------------------------------------------
        S_IDLE: begin
          if (rx_valid) begin
            cur_msg <= rx_msg;
            from_pe <= 1'b0;
            state   <= S_DECIDE;
          end else if (pe_req_valid) begin
            cur_req <= pe_req;
            from_pe <= 1'b1;
            state   <= S_DECIDE;
          end
        end

        // ---------------------------------------------------------------
        S_DECIDE: begin
          cur_idx  <= ld_idx;
          cur_e    <= ld_entry;
          cur_slot <= peer_slot;
          k        <= '0;
          bslot    <= '0;
          bmask    <= ld_entry.sh_used;
          state    <= S_IDLE;
          if (from_pe) begin
            pe_rsp.op     <= cur_req.op;
            pe_rsp.gid    <= cur_req.gid;
            pe_rsp.status <= ST_CANCEL;
            pe_rsp.data   <= '0;
            if (cur_req.op == OP_READ) begin
              if (!ld_hit) begin
                pe_rsp_valid <= 1'b1;
                ev.read_cancel <= 1'b1;
              end else if (ld_entry.valid) begin
                ev.read_hit <= 1'b1;
                after <= A_PE_RSP;
                state <= S_RD;
              end else if (lock[ld_idx] || rd_pend[ld_idx] || !fv_found) begin
                pe_rsp_valid <= 1'b1;
                ev.read_cancel <= 1'b1;
              end else begin
                rd_pend[ld_idx]   <= 1'b1;
                rd_poison[ld_idx] <= 1'b0;
                tx_r        <= '0;
                tx_r.peer   <= ld_entry.sh_node[fv_slot];
                tx_r.ptype  <= P_READ_REQ;
                tx_r.gid    <= ld_entry.gid;
                ev.read_remote <= 1'b1;
                state <= S_SEND;
              end
            end else begin
              if (!ld_hit || !ld_entry.valid) begin
                pe_rsp_valid <= 1'b1;
                ev.write_invalid <= 1'b1;
              end else if (lock[ld_idx] || rd_pend[ld_idx] || (serving[ld_idx] != '0)) begin
                pe_rsp_valid <= 1'b1;
                ev.write_cancel <= 1'b1;
              end else begin
                lock[ld_idx]    <= 1'b1;
                wbuf[ld_idx]    <= cur_req.data;
                tok_cnt[ld_idx] <= n_sharers;
                ev.write_start  <= 1'b1;
                if (n_sharers == 0) begin
                  wsrc  <= cur_req.data;
                  after <= A_COMMIT;
                  state <= S_WR;
                end else begin
                  bc_ptype <= P_TOKEN_REQ;
                  bc_ext   <= '0;
                  state    <= S_BCAST;
                end
              end
            end
          end else if (!ld_hit) begin
            ev.stale_drop <= 1'b1;              // block unknown here
          end else begin
            unique case (cur_msg.ptype)
              P_TOKEN_REQ: begin
                if (lock[ld_idx] && int'(cur_peer) > NODE_ID) begin
                  ev.token_withheld <= 1'b1;    // we win, requester yields
                end else begin
                  if (lock[ld_idx]) begin
                    lock[ld_idx]   <= 1'b0;     // we yield
                    tok_cnt[ld_idx] <= '0;
                    pe_rsp.op     <= OP_WRITE;
                    pe_rsp.gid    <= ld_entry.gid;
                    pe_rsp.status <= ST_CANCEL;
                    pe_rsp_valid  <= 1'b1;
                    ev.write_yield <= 1'b1;
                  end
                  if (rd_pend[ld_idx]) rd_poison[ld_idx] <= 1'b1;
                  ld_we           <= 1'b1;
                  ld_widx         <= ld_idx;
                  ld_wentry       <= ld_entry;
                  ld_wentry.valid <= 1'b0;
                  ev.invalidated <= 1'b1;
                  if (serving[ld_idx] != '0 && peer_found) begin
                    // data already sent to a reader: the token waits
                    // until that reader's UPDATE has arrived
                    owed[ld_idx][peer_slot] <= 1'b1;
                    ev.token_deferred <= 1'b1;
                  end else begin
                    tx_r       <= '0;
                    tx_r.peer  <= cur_peer;
                    tx_r.ptype <= P_TOKEN_RESP;
                    tx_r.gid   <= ld_entry.gid;
                    state <= S_SEND;
                  end
                end
              end
              P_TOKEN_RESP: begin
                if (lock[ld_idx] && tok_cnt[ld_idx] != 0) begin
                  tok_cnt[ld_idx] <= tok_cnt[ld_idx] - 1'b1;
                  if (tok_cnt[ld_idx] == 1) begin
                    wsrc  <= wbuf[ld_idx];
                    after <= A_COMMIT;
                    state <= S_WR;
                  end
                end else begin
                  ev.stale_drop <= 1'b1;
                end
              end
              P_WRITE_OK: begin
                if (rd_pend[ld_idx]) rd_poison[ld_idx] <= 1'b1;
                ld_we              <= 1'b1;
                ld_widx            <= ld_idx;
                ld_wentry          <= ld_entry;
                ld_wentry.valid    <= 1'b0;
                ld_wentry.sh_valid <= peer_found ? (N_SH)'(1) << peer_slot : '0;
              end
              P_READ_REQ: begin
                if (lock[ld_idx] || !ld_entry.valid) begin
                  tx_r       <= '0;
                  tx_r.peer  <= cur_peer;
                  tx_r.ptype <= P_READ_NACK;
                  tx_r.gid   <= ld_entry.gid;
                  ev.read_nack <= 1'b1;
                  state <= S_SEND;
                end else begin
                  if (peer_found) serving[ld_idx][peer_slot] <= 1'b1;
                  after <= A_SEND_DATA;
                  state <= S_RD;
                end
              end
              P_READ_NACK: begin
                if (rd_pend[ld_idx]) begin
                  rd_pend[ld_idx] <= 1'b0;
                  pe_rsp.op     <= OP_READ;
                  pe_rsp.gid    <= ld_entry.gid;
                  pe_rsp.status <= ST_CANCEL;
                  pe_rsp_valid  <= 1'b1;
                  ev.read_cancel <= 1'b1;
                end else begin
                  ev.stale_drop <= 1'b1;
                end
              end
              P_READ_DATA: begin
                if (!rd_pend[ld_idx]) begin
                  ev.stale_drop <= 1'b1;
                end else if (rd_poison[ld_idx]) begin
                  // the copy was invalidated meanwhile: drop the data,
                  // release the responder, cancel the read
                  rd_pend[ld_idx] <= 1'b0;
                  pe_rsp.op     <= OP_READ;
                  pe_rsp.gid    <= ld_entry.gid;
                  pe_rsp.status <= ST_CANCEL;
                  pe_rsp_valid  <= 1'b1;
                  ev.read_cancel <= 1'b1;
                  tx_r       <= '0;
                  tx_r.peer  <= cur_peer;
                  tx_r.ptype <= P_UPDATE;
                  tx_r.gid   <= ld_entry.gid;
                  tx_r.ext   <= '0;
                  state <= S_SEND;
                end else begin
                  wsrc  <= cur_msg.data;
                  after <= A_FILL;
                  state <= S_WR;
                end
              end
              P_UPDATE: begin
                if (peer_found) begin
                  serving[ld_idx][peer_slot] <= 1'b0;
                  if ((serving[ld_idx] & ~((N_SH)'(1) << peer_slot)) == '0
                      && owed[ld_idx] != '0) begin
                    owed[ld_idx] <= '0;
                    bmask    <= owed[ld_idx];
                    bc_ptype <= P_TOKEN_RESP;
                    bc_ext   <= '0;
                    state    <= S_BCAST;
                  end
                  if (cur_msg.ext[0]) begin
                    ld_we     <= 1'b1;
                    ld_widx   <= ld_idx;
                    ld_wentry <= with_peer_valid(ld_entry, peer_slot);
                  end
                end
              end
              default: ev.stale_drop <= 1'b1;
            endcase
          end
        end

        // ------------------------------------------- read block from memory
        S_RD: state <= S_RD_W;
        S_RD_W: begin
          rbuf[k] <= sm_rdata;
          if (k + 1'b1 >= cur_e.len) begin
            if (after == A_PE_RSP) begin
              pe_rsp.status <= ST_DONE;
              pe_rsp.data   <= rbuf;
              pe_rsp.data[k] <= sm_rdata;
              pe_rsp_valid  <= 1'b1;
              state <= S_IDLE;
            end else begin
              tx_r        <= '0;
              tx_r.peer   <= cur_peer;
              tx_r.ptype  <= P_READ_DATA;
              tx_r.gid    <= cur_e.gid;
              tx_r.nwords <= cur_e.len;
              tx_r.data   <= rbuf;
              tx_r.data[k] <= sm_rdata;
              ev.read_served <= 1'b1;
              state <= S_SEND;
            end
          end else begin
            k     <= k + 1'b1;
            state <= S_RD;
          end
        end

        // -------------------------------------------- write block to memory
        S_WR: begin
          if (k + 1'b1 >= cur_e.len) begin
            k         <= '0;
            bslot     <= '0;
            bmask     <= cur_e.sh_used;
            ld_we     <= 1'b1;
            ld_widx   <= cur_idx;
            pe_rsp.status <= ST_DONE;
            pe_rsp.gid    <= cur_e.gid;
            pe_rsp.data   <= wsrc;
            pe_rsp_valid  <= 1'b1;
            state     <= S_BCAST;
            if (after == A_COMMIT) begin
              lock[cur_idx] <= 1'b0;
              ld_wentry          <= cur_e;
              ld_wentry.valid    <= 1'b1;
              ld_wentry.sh_valid <= '0;
              bc_ptype  <= P_WRITE_OK;
              bc_ext    <= '0;
              pe_rsp.op <= OP_WRITE;
              ev.write_done <= 1'b1;
            end else begin
              rd_pend[cur_idx] <= 1'b0;
              ld_wentry        <= with_peer_valid(cur_e, cur_slot);
              ld_wentry.valid  <= 1'b1;
              bc_ptype  <= P_UPDATE;
              bc_ext    <= PEXT_W'(1);
              pe_rsp.op <= OP_READ;
              ev.read_done <= 1'b1;
            end
          end else begin
            k <= k + 1'b1;
          end
        end

        // ------------------------------------------------ message sending
        S_SEND: if (tx_ready) state <= S_IDLE;

        S_BCAST: begin
          if (!bmask[bslot] || tx_ready) begin
            if (int'(bslot) == N_SH - 1) state <= S_IDLE;
            else bslot <= bslot + 1'b1;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // Every message handed to the network interface has a protocol type and
  // stays offered until it is accepted.
  a_tx_type: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid |-> tx_msg.ptype != P_NONE);
  a_tx_hold: assert property (@(posedge clk) disable iff (!rst_n)
    tx_valid && !tx_ready && state == S_SEND |=> tx_valid && $stable(tx_msg));

endmodule
