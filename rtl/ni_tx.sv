// ni_tx: network-interface send side. Turns one message of the memory
// controller into one packet of flits and injects it into the network.
//
// A message is one packet: a header flit (source and destination mesh
// coordinates), a first data-body flit carrying the protocol word (P_TYPE,
// P_GID, P_EXTENSION), msg.nwords further data-body flits when the message
// carries block data, and a tail flit. Protocol-only messages are therefore
// three flits long, data messages four or more, as in the protocol
// description. Messages leave in the order the controller hands them over.
//
// Handshakes: msg_valid/msg_ready accepts a message when the unit is idle;
// flit_valid/flit_ready moves one flit per cycle where both are high. The
// flit ID field carries the sender's node index so that the receiver can
// separate interleaved packets (this design's choice). A packet of n data
// chunks takes n+3 cycles when the network never stalls.
module ni_tx
  import coh_pkg::*;
#(
  parameter int unsigned NODE_ID = 0
) (
  input  logic              clk,
  input  logic              rst_n,
  input  msg_t              msg,
  input  logic              msg_valid,
  output logic              msg_ready,
  output logic [FLIT_W-1:0] flit,
  output logic              flit_valid,
  input  logic              flit_ready
);

  typedef enum logic [1:0] {S_IDLE, S_HDR, S_BODY, S_TAIL} state_e;

  state_e             state;
  msg_t               cur;
  logic [LEN_W:0]     cnt;     // 0: protocol word, 1..nwords: data chunks

  hdr_flit_t  hdr;
  body_flit_t body;
  pword_t     pw;

  assign msg_ready  = (state == S_IDLE);
  assign flit_valid = (state != S_IDLE);

  always_comb begin
    hdr     = '0;
    hdr.typ = FT_HEADER;
    hdr.id  = 4'(NODE_ID);
    hdr.sx  = node_x(node_t'(NODE_ID));
    hdr.sy  = node_y(node_t'(NODE_ID));
    hdr.dx  = node_x(cur.peer);
    hdr.dy  = node_y(cur.peer);

    pw.ptype = cur.ptype;
    pw.gid   = cur.gid;
    pw.ext   = cur.ext;

    body     = '0;
    body.id  = 4'(NODE_ID);
    if (state == S_TAIL) begin
      body.typ  = FT_TAIL;
      body.data = '0;
    end else begin
      body.typ  = FT_BODY;
      if (cnt == 0) body.data = pw;
      else          body.data = cur.data[cnt[LEN_W-1:0] - 1'b1];
    end

    flit = (state == S_HDR) ? FLIT_W'(hdr) : FLIT_W'(body);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      cur   <= '0;
      cnt   <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (msg_valid) begin
          cur   <= msg;
          cnt   <= '0;
          state <= S_HDR;
        end
        S_HDR: if (flit_ready) state <= S_BODY;
        S_BODY: if (flit_ready) begin
          if (cnt == (LEN_W + 1)'(cur.nwords)) state <= S_TAIL;
          else cnt <= cnt + 1'b1;
        end
        S_TAIL: if (flit_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // A message never carries more chunks than a block can hold.
  a_len: assert property (@(posedge clk) disable iff (!rst_n)
    msg_valid && msg_ready |-> int'(msg.nwords) <= MAX_WORDS);

endmodule
