// tb_ni_rx: checks the network-interface receive side. Packets from several
// senders are built here bit by bit from the flit layout and delivered with
// their flits interleaved at random between senders (each sender's flits in
// order). The controller side accepts messages at random, so the queue fills
// and the unit must hold flits back instead of losing them. Every message
// must come out complete and correct, in the order its tail flit went in.
// Reassembly per sender follows the protocol's receive scheme; the queue
// depth and handshakes are this design's own.
module tb_ni_rx;
  import coh_pkg::*;

  localparam int DEPTH = 4;
  localparam int NPKT  = 60;      // packets per sender

  logic              clk = 1'b0, rst_n = 1'b0;
  logic [FLIT_W-1:0] flit;
  logic              flit_valid, flit_ready;
  msg_t              msg;
  logic              msg_valid, msg_ready;
  logic              overflow_err;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ni_rx #(.DEPTH(DEPTH)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // per sender: flit stream, and the message each packet stands for
  logic [FLIT_W-1:0] stream [N_NODES][$];
  msg_t              sent   [N_NODES][$];
  msg_t              expect_q[$];
  bit                full_seen = 1'b0;

  function automatic logic [FLIT_W-1:0] mk(int typ, int id, logic [31:0] d);
    return {4'(typ), 4'(id), d};
  endfunction

  task automatic build(input int s);
    msg_t m;
    int nw;
    nw = $urandom % (MAX_WORDS + 1);
    m = '0;
    m.peer = node_t'(s);
    m.ptype = ptype_e'(1 + $urandom % 7);
    m.gid = GID_W'($urandom);
    m.ext = PEXT_W'($urandom);
    m.nwords = LEN_W'(nw);
    for (int w = 0; w < nw; w++) m.data[w] = $urandom;
    stream[s].push_back({4'd1, 4'(s), 4'(s / 2), 4'(s % 2), 4'd0, 4'(1), 4'(1), 12'd0});
    stream[s].push_back(mk(2, s, {4'(m.ptype), m.gid, m.ext}));
    for (int w = 0; w < nw; w++) stream[s].push_back(mk(2, s, m.data[w]));
    stream[s].push_back(mk(3, s, 32'h0));
    sent[s].push_back(m);
  endtask

  // driver: pick a random sender with flits left each cycle
  int cur_s = -1;
  always @(negedge clk) begin
    if (rst_n && !(flit_valid && !flit_ready_q)) begin
      int cand [$];
      for (int s = 0; s < N_NODES; s++) if (stream[s].size() > 0) cand.push_back(s);
      if (cand.size() > 0 && ($urandom % 4) != 0) begin
        cur_s = cand[$urandom % cand.size()];
        flit = stream[cur_s][0];
        flit_valid = 1'b1;
      end else begin
        flit_valid = 1'b0;
      end
    end
    msg_ready = ($urandom % 3) == 0;
  end

  logic flit_ready_q = 1'b0;
  always @(posedge clk) begin
    flit_ready_q <= flit_ready;
    if (flit_valid && flit_ready) begin
      void'(stream[cur_s].pop_front());
      if (flit[39:36] == 4'd3) expect_q.push_back(sent[cur_s].pop_front());
      if (flit[39:36] == 4'd3) flit_valid <= 1'b0;
      else flit_valid <= 1'b0;
    end
    if (!flit_ready) full_seen = 1'b1;
    if (msg_valid && msg_ready) begin
      check(expect_q.size() > 0, "message without packet");
      if (expect_q.size() > 0) begin
        msg_t e;
        e = expect_q.pop_front();
        check(msg.peer == e.peer && msg.ptype == e.ptype && msg.gid == e.gid && msg.ext == e.ext,
              $sformatf("header/protocol word of message from %0d", e.peer));
        check(msg.nwords == e.nwords, $sformatf("length %0d vs %0d", msg.nwords, e.nwords));
        for (int w = 0; w < int'(e.nwords); w++)
          check(msg.data[w] == e.data[w], $sformatf("data chunk %0d", w));
      end
    end
  end

  initial begin
    int total;
    flit = '0; flit_valid = 1'b0; msg_ready = 1'b0;
    for (int s = 0; s < N_NODES; s++) for (int p = 0; p < NPKT; p++) build(s);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    total = 0;
    for (int s = 0; s < N_NODES; s++) total += stream[s].size();
    wait (stream[0].size() == 0 && stream[1].size() == 0 &&
          stream[2].size() == 0 && stream[3].size() == 0 && expect_q.size() == 0 && !msg_valid);
    repeat (5) @(posedge clk);
    check(full_seen, "queue never filled up");
    check(!overflow_err, "overflow flag set");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
