// ni_rx: network-interface receive side. Rebuilds messages from incoming
// flits and hands complete messages to the memory controller.
//
// Packets from different senders may arrive interleaved flit by flit. Each
// flit carries an ID; here the ID is the sender's node index, and the unit
// keeps one assembly buffer per ID. A header flit opens the buffer and
// records the sender's mesh coordinates, the first data-body flit gives the
// protocol word, further data-body flits are block data chunks, and the tail
// flit closes the message, which is then queued. Complete messages leave in
// the order their tails arrived, through a queue of DEPTH messages.
//
// Handshakes: flit_valid/flit_ready (a flit is taken when both are high;
// ready falls while the queue is full, so no flit is ever dropped) and
// msg_valid/msg_ready towards the controller (msg is the queue head).
// Data chunks beyond MAX_WORDS are discarded and counted as an error.
// Per-sender buffers follow the receive scheme of the protocol description;
// the queue depth is this design's choice.
module ni_rx
  import coh_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [FLIT_W-1:0] flit,
  input  logic              flit_valid,
  output logic              flit_ready,
  output msg_t              msg,
  output logic              msg_valid,
  input  logic              msg_ready,
  output logic              overflow_err
);

  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  msg_t            asm_msg [N_NODES];
  logic [LEN_W:0]  asm_cnt [N_NODES];   // body flits seen so far

  msg_t            q [DEPTH];
  logic [PW-1:0]   rd_ptr, wr_ptr;
  logic [PW:0]     count;

  hdr_flit_t  hf;
  body_flit_t bf;
  pword_t     pw;
  node_t      sid;
  logic       take, push, pop;

  assign hf  = hdr_flit_t'(flit);
  assign bf  = body_flit_t'(flit);
  assign pw  = pword_t'(bf.data);
  assign sid = node_t'(bf.id);

  assign flit_ready = (int'(count) < DEPTH);
  assign take       = flit_valid && flit_ready;
  assign push       = take && (bf.typ == FT_TAIL);
  assign msg_valid  = (count != 0);
  assign pop        = msg_valid && msg_ready;
  assign msg        = q[rd_ptr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_NODES; i++) begin
        asm_msg[i] <= '0;
        asm_cnt[i] <= '0;
      end
      for (int i = 0; i < DEPTH; i++) q[i] <= '0;
      rd_ptr       <= '0;
      wr_ptr       <= '0;
      count        <= '0;
      overflow_err <= 1'b0;
    end else begin
      if (take) begin
        unique case (bf.typ)
          FT_HEADER: begin
            asm_msg[sid]      <= '0;
            asm_msg[sid].peer <= coord_node(hf.sx, hf.sy);
            asm_cnt[sid]      <= '0;
          end
          FT_BODY: begin
            if (asm_cnt[sid] == 0) begin
              asm_msg[sid].ptype <= pw.ptype;
              asm_msg[sid].gid   <= pw.gid;
              asm_msg[sid].ext   <= pw.ext;
            end else if (int'(asm_cnt[sid]) <= MAX_WORDS) begin
              asm_msg[sid].data[asm_cnt[sid][LEN_W-1:0] - 1'b1] <= bf.data;
              asm_msg[sid].nwords <= asm_cnt[sid][LEN_W-1:0];
            end else begin
              overflow_err <= 1'b1;
            end
            if (int'(asm_cnt[sid]) <= MAX_WORDS) asm_cnt[sid] <= asm_cnt[sid] + 1'b1;
          end
          FT_TAIL: begin
            q[wr_ptr] <= asm_msg[sid];
            wr_ptr    <= (int'(wr_ptr) == DEPTH - 1) ? '0 : wr_ptr + 1'b1;
          end
          default: ;
        endcase
      end
      if (pop) rd_ptr <= (int'(rd_ptr) == DEPTH - 1) ? '0 : rd_ptr + 1'b1;
      count <= count + (PW + 1)'(push) - (PW + 1)'(pop);
    end
  end

endmodule
