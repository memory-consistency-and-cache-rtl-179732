// tb_memory_controller: directed protocol scenarios for one memory
// controller (node 1), with a real local directory and shared memory beside
// it. The testbench stands in for the network (it injects messages and
// collects the messages the controller sends) and for the processing element.
// Scenarios: read hit (with its latency), read miss fetched from the first
// valid sharer, a write collecting three tokens (with a read hit, a repeated
// write and a refused read request while locked), invalidation by a remote
// token request, a refused write to an Invalid copy, a remote write success,
// write priority in both directions, serving a read with the token deferred
// until the reader's UPDATE, a read cancelled by an invalidation in flight,
// and a read refused by the responder.
// The read, write, token and update flows checked follow the protocol
// description; NACK, deferred tokens, poisoned reads and the lower-index
// priority are this design's own additions and are checked as such.
module tb_memory_controller;
  import coh_pkg::*;

  localparam int unsigned ENTRIES = 8;
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int          ME = 1;

  typedef logic [MAX_WORDS-1:0][CHUNK_W-1:0] block_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pe_req_t pe_req;  logic pe_req_valid, pe_req_ready;
  pe_rsp_t pe_rsp;  logic pe_rsp_valid;
  msg_t rx_msg, tx_msg;
  logic rx_valid, rx_ready, tx_valid, tx_ready;
  logic [GID_W-1:0] ld_gid; logic ld_hit; logic [IW-1:0] ld_idx; ld_entry_t ld_entry;
  logic mc_ld_we, ld_we; logic [IW-1:0] mc_ld_widx, ld_widx; ld_entry_t mc_ld_wentry, ld_wentry;
  logic mc_sm_we, sm_we; logic [ADDR_W-1:0] mc_sm_addr, sm_addr;
  logic [CHUNK_W-1:0] mc_sm_wdata, sm_wdata, sm_rdata;
  mc_ev_t ev;
  logic init_ld_we = 1'b0, init_sm_we = 1'b0;
  logic [IW-1:0] init_ld_idx; ld_entry_t init_ld_entry;
  logic [ADDR_W-1:0] init_sm_addr; logic [CHUNK_W-1:0] init_sm_wdata;

  assign ld_we     = init_ld_we | mc_ld_we;
  assign ld_widx   = init_ld_we ? init_ld_idx : mc_ld_widx;
  assign ld_wentry = init_ld_we ? init_ld_entry : mc_ld_wentry;
  assign sm_we     = init_sm_we | mc_sm_we;
  assign sm_addr   = init_sm_we ? init_sm_addr : mc_sm_addr;
  assign sm_wdata  = init_sm_we ? init_sm_wdata : mc_sm_wdata;

  memory_controller #(.NODE_ID(ME), .ENTRIES(ENTRIES)) dut (
    .clk, .rst_n, .pe_req, .pe_req_valid, .pe_req_ready, .pe_rsp, .pe_rsp_valid,
    .rx_msg, .rx_valid, .rx_ready, .tx_msg, .tx_valid, .tx_ready,
    .ld_gid, .ld_hit, .ld_idx, .ld_entry,
    .ld_we(mc_ld_we), .ld_widx(mc_ld_widx), .ld_wentry(mc_ld_wentry),
    .sm_we(mc_sm_we), .sm_addr(mc_sm_addr), .sm_wdata(mc_sm_wdata), .sm_rdata, .ev);

  local_directory #(.ENTRIES(ENTRIES)) u_ld (
    .clk, .rst_n, .lk_gid(ld_gid), .lk_hit(ld_hit), .lk_idx(ld_idx), .lk_entry(ld_entry),
    .we(ld_we), .widx(ld_widx), .wentry(ld_wentry));

  shared_memory #(.WORDS(64)) u_sm (.clk, .we(sm_we), .addr(sm_addr), .wdata(sm_wdata), .rdata(sm_rdata));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ------------------------------------------------------------ capture
  msg_t    txq[$];
  pe_rsp_t rspq[$];
  int      cyc = 0;
  always @(posedge clk) begin
    cyc++;
    if (tx_valid && tx_ready) txq.push_back(tx_msg);
    if (pe_rsp_valid) rspq.push_back(pe_rsp);
  end
  always @(negedge clk) tx_ready = ($urandom % 4) != 0;

  // ------------------------------------------------------------ helpers
  function automatic block_t pattern(int base);
    block_t b;
    for (int w = 0; w < MAX_WORDS; w++) b[w] = 32'(base + w);
    return b;
  endfunction

  task automatic init_row(input int r, input int gid, input int addr, input int len,
                          input bit valid, input int nodes[$], input bit vals[$], input int dbase);
    @(negedge clk);
    init_ld_we = 1'b1; init_ld_idx = IW'(r);
    init_ld_entry = '0;
    init_ld_entry.used = 1'b1; init_ld_entry.gid = GID_W'(gid);
    init_ld_entry.addr = ADDR_W'(addr); init_ld_entry.len = LEN_W'(len);
    init_ld_entry.valid = valid;
    for (int s = 0; s < nodes.size(); s++) begin
      init_ld_entry.sh_used[s] = 1'b1;
      init_ld_entry.sh_node[s] = node_t'(nodes[s]);
      init_ld_entry.sh_valid[s] = vals[s];
    end
    for (int w = 0; w < len; w++) begin
      @(negedge clk);
      init_ld_we = 1'b0;
      init_sm_we = 1'b1; init_sm_addr = ADDR_W'(addr + w); init_sm_wdata = 32'(dbase + w);
    end
    @(negedge clk);
    init_sm_we = 1'b0;
  endtask

  task automatic pe(input op_e op, input int gid, input block_t d);
    @(negedge clk);
    pe_req.op = op; pe_req.gid = GID_W'(gid); pe_req.data = d; pe_req_valid = 1'b1;
    do @(posedge clk); while (!pe_req_ready);
    @(negedge clk);
    pe_req_valid = 1'b0;
  endtask

  task automatic rx(input int from, input ptype_e t, input int gid, input int ext = 0,
                    input int nw = 0, input block_t d = '0);
    @(negedge clk);
    rx_msg = '0;
    rx_msg.peer = node_t'(from); rx_msg.ptype = t; rx_msg.gid = GID_W'(gid);
    rx_msg.ext = PEXT_W'(ext); rx_msg.nwords = LEN_W'(nw); rx_msg.data = d;
    rx_valid = 1'b1;
    do @(posedge clk); while (!rx_ready);
    @(negedge clk);
    rx_valid = 1'b0;
  endtask

  task automatic expect_tx(input int to, input ptype_e t, input int gid, input string what);
    int n = 0;
    while (txq.size() == 0 && n < 100) begin @(posedge clk); n++; end
    check(txq.size() > 0, {what, ": no message sent"});
    if (txq.size() > 0) begin
      msg_t m;
      m = txq.pop_front();
      check(int'(m.peer) == to && m.ptype == t && int'(m.gid) == gid,
            $sformatf("%s: got %s to %0d gid %0d, expected %s to %0d gid %0d",
                      what, m.ptype.name(), m.peer, m.gid, t.name(), to, gid));
    end
  endtask

  task automatic expect_rsp(input op_e op, input int gid, input status_e st, input string what);
    int n = 0;
    while (rspq.size() == 0 && n < 100) begin @(posedge clk); n++; end
    check(rspq.size() > 0, {what, ": no PE response"});
    if (rspq.size() > 0) begin
      pe_rsp_t r;
      r = rspq.pop_front();
      check(r.op == op && int'(r.gid) == gid && r.status == st,
            $sformatf("%s: got %s gid %0d %s", what, r.op.name(), r.gid, r.status.name()));
    end
  endtask

  task automatic quiet(input int n, input string what);
    repeat (n) @(posedge clk);
    check(txq.size() == 0, {what, ": unexpected message"});
    check(rspq.size() == 0, {what, ": unexpected PE response"});
    txq.delete(); rspq.delete();
  endtask

  function automatic ld_entry_t row(int r);
    return u_ld.tab[r];
  endfunction

  // ------------------------------------------------------------ scenarios
  initial begin
    pe_req = '0; pe_req_valid = 1'b0; rx_msg = '0; rx_valid = 1'b0;
    init_ld_idx = '0; init_ld_entry = '0; init_sm_addr = '0; init_sm_wdata = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // row 0: GID 10, 2 chunks at 0, valid, sharers 0, 2, 3 valid
    init_row(0, 10, 0, 2, 1'b1, '{0, 2, 3}, '{1, 1, 1}, 32'hA000);
    // row 1: GID 11, 1 chunk at 4, invalid, sharers 0 (invalid), 3 (valid)
    init_row(1, 11, 4, 1, 1'b0, '{0, 3}, '{0, 1}, 32'hB000);
    // row 2: GID 12, 3 chunks at 8, valid, sharers 2, 3 valid
    init_row(2, 12, 8, 3, 1'b1, '{2, 3}, '{1, 1}, 32'hC000);

    // A: read hit, latency 2 + 2*len cycles from acceptance to response
    begin
      int t0;
      @(negedge clk);
      txq.delete(); rspq.delete();
      pe_req.op = OP_READ; pe_req.gid = 10; pe_req_valid = 1'b1;
      do @(posedge clk); while (!pe_req_ready);
      t0 = cyc;
      @(negedge clk);
      pe_req_valid = 1'b0;
      while (!pe_rsp_valid) @(negedge clk);
      check(cyc - t0 == 2 + 2 * 2, $sformatf("read hit latency %0d", cyc - t0));
      check(pe_rsp.status == ST_DONE && pe_rsp.data[0] == 32'hA000 && pe_rsp.data[1] == 32'hA001,
            "read hit data");
      @(posedge clk); #1 void'(rspq.pop_front());
      quiet(0, "A");
      check(txq.size() == 0, "A: read hit sends nothing");
    end

    // B: read miss: request to first valid sharer (node 3), data, updates
    pe(OP_READ, 11, '0);
    expect_tx(3, P_READ_REQ, 11, "B read request");
    quiet(10, "B wait");
    rx(3, P_READ_DATA, 11, 0, 1, pattern(32'hB100));
    expect_rsp(OP_READ, 11, ST_DONE, "B read done");
    expect_tx(0, P_UPDATE, 11, "B update to 0");
    expect_tx(3, P_UPDATE, 11, "B update to 3");
    quiet(5, "B end");
    check(row(1).valid && row(1).sh_valid[1] && !row(1).sh_valid[0], "B: LD after read");
    check(u_sm.mem[4] == 32'hB100, "B: data stored");

    // C: write with three tokens
    pe(OP_WRITE, 10, pattern(32'hA100));
    expect_tx(0, P_TOKEN_REQ, 10, "C token req 0");
    expect_tx(2, P_TOKEN_REQ, 10, "C token req 2");
    expect_tx(3, P_TOKEN_REQ, 10, "C token req 3");
    rx(0, P_TOKEN_RESP, 10);
    rx(2, P_TOKEN_RESP, 10);
    quiet(5, "C two tokens");
    pe(OP_READ, 10, '0);
    expect_rsp(OP_READ, 10, ST_DONE, "C read hit while locked");
    pe(OP_WRITE, 10, pattern(32'hA200));
    expect_rsp(OP_WRITE, 10, ST_CANCEL, "C repeated write cancelled");
    rx(2, P_READ_REQ, 10);
    expect_tx(2, P_READ_NACK, 10, "C read request refused while locked");
    check(u_sm.mem[0] == 32'hA000, "C: no write before last token");
    rx(3, P_TOKEN_RESP, 10);
    expect_rsp(OP_WRITE, 10, ST_DONE, "C write done");
    expect_tx(0, P_WRITE_OK, 10, "C write ok 0");
    expect_tx(2, P_WRITE_OK, 10, "C write ok 2");
    expect_tx(3, P_WRITE_OK, 10, "C write ok 3");
    quiet(5, "C end");
    check(u_sm.mem[0] == 32'hA100 && u_sm.mem[1] == 32'hA101, "C: data written");
    check(row(0).valid && row(0).sh_valid == '0, "C: LD after write");

    // D: remote token request invalidates; write to Invalid refused
    rx(3, P_TOKEN_REQ, 10);
    expect_tx(3, P_TOKEN_RESP, 10, "D token returned");
    quiet(3, "D");
    check(!row(0).valid, "D: copy invalidated");
    pe(OP_WRITE, 10, pattern(1));
    expect_rsp(OP_WRITE, 10, ST_CANCEL, "D write to Invalid refused");

    // E: remote write success: only the writer is valid
    rx(3, P_WRITE_OK, 10);
    quiet(3, "E");
    check(!row(0).valid && row(0).sh_valid == 3'b100, "E: LD after remote write");

    // F: priority. Node 1 writes GID 11 (valid since B).
    pe(OP_WRITE, 11, pattern(32'hB200));
    expect_tx(0, P_TOKEN_REQ, 11, "F token req 0");
    expect_tx(3, P_TOKEN_REQ, 11, "F token req 3");
    rx(3, P_TOKEN_REQ, 11);                     // lower priority: held back
    quiet(20, "F token withheld from node 3");
    check(row(1).valid, "F: still valid after lower-priority request");
    rx(0, P_TOKEN_REQ, 11);                     // higher priority: yield
    expect_rsp(OP_WRITE, 11, ST_CANCEL, "F own write abandoned");
    expect_tx(0, P_TOKEN_RESP, 11, "F token to node 0");
    rx(3, P_TOKEN_RESP, 11);                    // stale token
    quiet(10, "F stale token ignored");
    check(!row(1).valid && u_sm.mem[4] == 32'hB100, "F: invalid, old data kept");

    // G: serve a read; the token of a writer waits for the reader's UPDATE
    rx(2, P_READ_REQ, 12);
    begin
      automatic int n = 0;
      while (txq.size() == 0 && n < 100) begin @(posedge clk); n++; end
      check(txq.size() == 1 && txq[0].ptype == P_READ_DATA && int'(txq[0].peer) == 2
            && int'(txq[0].nwords) == 3 && txq[0].data[0] == 32'hC000
            && txq[0].data[2] == 32'hC002, "G: block data sent");
      txq.delete();
    end
    pe(OP_WRITE, 12, pattern(2));
    expect_rsp(OP_WRITE, 12, ST_CANCEL, "G local write refused while serving");
    rx(3, P_TOKEN_REQ, 12);
    quiet(20, "G token deferred");
    check(!row(2).valid, "G: copy invalidated at once");
    rx(2, P_UPDATE, 12, 1);
    expect_tx(3, P_TOKEN_RESP, 12, "G deferred token sent after UPDATE");
    quiet(3, "G end");
    check(row(2).sh_valid[0], "G: reader marked valid");

    // H: read poisoned by an invalidation before its data arrives
    pe(OP_READ, 11, '0);
    expect_tx(3, P_READ_REQ, 11, "H read request");
    rx(0, P_TOKEN_REQ, 11);
    expect_tx(0, P_TOKEN_RESP, 11, "H token");
    rx(3, P_READ_DATA, 11, 0, 1, pattern(32'hDEAD));
    expect_rsp(OP_READ, 11, ST_CANCEL, "H read cancelled");
    expect_tx(3, P_UPDATE, 11, "H responder released");
    quiet(3, "H end");
    check(!row(1).valid && u_sm.mem[4] == 32'hB100, "H: stale data not stored");

    // I: read refused by the responder
    pe(OP_READ, 11, '0);
    expect_tx(3, P_READ_REQ, 11, "I read request");
    rx(3, P_READ_NACK, 11);
    expect_rsp(OP_READ, 11, ST_CANCEL, "I read cancelled");
    quiet(3, "I end");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
