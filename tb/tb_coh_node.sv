// tb_coh_node: one complete node (network interface, memory controller,
// local directory, shared memory) driven at flit level. The testbench plays
// the router port and the processing element of node 1 (mesh position x=0,
// y=1) and checks every flit the node sends against packets it builds
// itself from the flit format.
// Scenarios: a remote read request is answered with a READ_DATA packet
// carrying the block; the reader's UPDATE marks it valid in the directory;
// a PE write sends TOKEN_REQ packets to all three sharers, completes when
// their TOKEN_RESP packets arrive with their flits interleaved, writes the
// shared memory and broadcasts WRITE_OK; a read hit returns the new data;
// a remote token request invalidates the copy. The output port stalls at
// random throughout.
// The expected packets follow the published flit and protocol-word layout;
// the message codes, node numbering and sender ID in the flit are this
// design's own choices, as in the RTL.
module tb_coh_node;
  import coh_pkg::*;

  localparam int unsigned ENTRIES = 8;
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int          ME = 1;

  typedef logic [MAX_WORDS-1:0][CHUNK_W-1:0] block_t;
  typedef logic [FLIT_W-1:0] flit_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  pe_req_t pe_req = '0;  logic pe_req_valid = 1'b0, pe_req_ready;
  pe_rsp_t pe_rsp;       logic pe_rsp_valid;
  flit_t flit_out, flit_in = '0;
  logic flit_out_valid, flit_out_ready, flit_in_valid = 1'b0, flit_in_ready;
  logic init_ld_we = 1'b0, init_sm_we = 1'b0;
  logic [IW-1:0] init_ld_idx = '0; ld_entry_t init_ld_entry = '0;
  logic [ADDR_W-1:0] init_sm_addr = '0; logic [CHUNK_W-1:0] init_sm_wdata = '0;
  mc_ev_t ev; logic rx_overflow;

  coh_node #(.NODE_ID(ME), .ENTRIES(ENTRIES), .SM_WORDS(64), .RX_DEPTH(4)) dut (
    .clk, .rst_n, .pe_req, .pe_req_valid, .pe_req_ready, .pe_rsp, .pe_rsp_valid,
    .flit_out, .flit_out_valid, .flit_out_ready, .flit_in, .flit_in_valid, .flit_in_ready,
    .init_ld_we, .init_ld_idx, .init_ld_entry, .init_sm_we, .init_sm_addr, .init_sm_wdata,
    .ev, .rx_overflow);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL @%0t: %s", $time, what); end
  endtask

  // ------------------------------------------------ reference flit builders
  function automatic flit_t hdr(int from, int to);
    flit_t f = '0;
    f[39:36] = 4'd1;                 f[35:32] = 4'(from);
    f[31:28] = 4'(from / 2);         f[27:24] = 4'(from % 2);
    f[19:16] = 4'(to / 2);           f[15:12] = 4'(to % 2);
    return f;
  endfunction
  function automatic flit_t body(int from, logic [31:0] d);
    return {4'd2, 4'(from), d};
  endfunction
  function automatic flit_t tail(int from);
    return {4'd3, 4'(from), 32'd0};
  endfunction
  function automatic logic [31:0] pword(ptype_e t, int gid, int ext);
    return {4'(t), 17'(gid), 11'(ext)};
  endfunction

  // A packet is a queue of flits.
  typedef flit_t pkt_t[$];
  function automatic pkt_t packet(int from, int to, ptype_e t, int gid, int ext,
                                  int n, block_t d);
    pkt_t p;
    p.push_back(hdr(from, to));
    p.push_back(body(from, pword(t, gid, ext)));
    for (int w = 0; w < n; w++) p.push_back(body(from, d[w]));
    p.push_back(tail(from));
    return p;
  endfunction

  // ------------------------------------------------------- output capture
  flit_t outq[$];
  always @(posedge clk) if (flit_out_valid && flit_out_ready) outq.push_back(flit_out);
  always @(negedge clk) flit_out_ready = ($urandom % 3) != 0;

  // Wait for the node to send a packet identical to the expected one.
  task automatic expect_pkt(input pkt_t exp, input string what);
    int n = 0;
    while (outq.size() < exp.size() && n < 300) begin @(posedge clk); n++; end
    #1;
    check(outq.size() >= exp.size(), {what, ": packet not sent"});
    for (int i = 0; i < exp.size() && outq.size() > 0; i++) begin
      flit_t f = outq.pop_front();
      check(f == exp[i], $sformatf("%s: flit %0d is %h, expected %h", what, i, f, exp[i]));
    end
  endtask

  // Expect a set of packets to different peers in any order (one per peer).
  task automatic expect_pkts_any(input int peers[$], input ptype_e t, input int gid,
                                 input int ext, input string what);
    int n = 0;
    int need = 3 * peers.size();
    bit seen[N_NODES];
    while (outq.size() < need && n < 400) begin @(posedge clk); n++; end
    #1;
    check(outq.size() >= need, {what, ": packets not sent"});
    foreach (seen[i]) seen[i] = 1'b0;
    for (int k = 0; k < peers.size() && outq.size() >= 3; k++) begin
      flit_t h = outq.pop_front();
      flit_t b = outq.pop_front();
      flit_t tl = outq.pop_front();
      int to = int'(h[19:16]) * 2 + int'(h[15:12]);
      check(h == hdr(ME, to), $sformatf("%s: header %h", what, h));
      check(b == body(ME, pword(t, gid, ext)), $sformatf("%s: protocol flit %h", what, b));
      check(tl == tail(ME), $sformatf("%s: tail %h", what, tl));
      seen[to] = 1'b1;
    end
    foreach (peers[k]) check(seen[peers[k]], $sformatf("%s: nothing to node %0d", what, peers[k]));
  endtask

  // --------------------------------------------------------- flit driving
  // Drive a list of flits, one per accepted cycle, with random idle cycles.
  task automatic drive(input pkt_t fl);
    foreach (fl[i]) begin
      @(negedge clk);
      while (($urandom % 4) == 0) begin flit_in_valid = 1'b0; @(negedge clk); end
      flit_in = fl[i]; flit_in_valid = 1'b1;
      @(posedge clk);
      while (!flit_in_ready) @(posedge clk);
    end
    @(negedge clk); flit_in_valid = 1'b0;
  endtask

  // Interleave several packets flit by flit in a random order, keeping the
  // order within each packet (as wormhole packets from different inputs
  // would arrive at one output port).
  function automatic pkt_t interleave(pkt_t a, pkt_t b, pkt_t c);
    pkt_t r;
    while (a.size() + b.size() + c.size() > 0) begin
      int s = $urandom % 3;
      if (s == 0 && a.size() > 0) r.push_back(a.pop_front());
      else if (s == 1 && b.size() > 0) r.push_back(b.pop_front());
      else if (s == 2 && c.size() > 0) r.push_back(c.pop_front());
    end
    return r;
  endfunction

  // ------------------------------------------------------------- PE side
  pe_rsp_t rspq[$];
  always @(posedge clk) if (pe_rsp_valid) rspq.push_back(pe_rsp);

  task automatic pe(input op_e op, input int gid, input block_t d);
    @(negedge clk);
    pe_req.op = op; pe_req.gid = 17'(gid); pe_req.data = d; pe_req_valid = 1'b1;
    @(posedge clk);
    while (!pe_req_ready) @(posedge clk);
    @(negedge clk); pe_req_valid = 1'b0;
  endtask

  task automatic expect_rsp(input op_e op, input status_e st, input int nw, input block_t d,
                            input string what);
    int n = 0;
    while (rspq.size() == 0 && n < 400) begin @(posedge clk); n++; end
    #1;
    check(rspq.size() > 0, {what, ": no PE response"});
    if (rspq.size() > 0) begin
      pe_rsp_t r = rspq.pop_front();
      check(r.op == op && r.status == st && r.gid == 17'(GID), {what, ": response fields"});
      for (int w = 0; w < nw; w++)
        check(r.data[w] == d[w], $sformatf("%s: data word %0d", what, w));
    end
  endtask

  // ------------------------------------------------------------- scenario
  localparam int GID = 20;
  block_t init_data, wr_data;
  pkt_t   p0, p2, p3;

  initial begin
    automatic int cyc = 0;
    while (cyc < 20000) begin @(posedge clk); cyc++; end
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ld_entry_t e;
    for (int w = 0; w < MAX_WORDS; w++) begin
      init_data[w] = 32'h5A00_0000 + 32'(w);
      wr_data[w]   = $urandom;
    end
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1'b1;

    // Directory row 0: GID 20, two chunks at address 8, valid here and at
    // nodes 0, 2 and 3 (so the node is the first valid sharer of itself).
    e = '0;
    e.used = 1'b1; e.gid = 17'(GID); e.addr = 12'd8; e.len = LEN_W'(2); e.valid = 1'b1;
    e.sh_used = 3'b111; e.sh_valid = 3'b111;
    e.sh_node[0] = node_t'(0); e.sh_node[1] = node_t'(2); e.sh_node[2] = node_t'(3);
    @(negedge clk); init_ld_we = 1'b1; init_ld_idx = '0; init_ld_entry = e;
    @(negedge clk); init_ld_we = 1'b0;
    for (int w = 0; w < 2; w++) begin
      init_sm_we = 1'b1; init_sm_addr = 12'(8 + w); init_sm_wdata = init_data[w];
      @(negedge clk);
    end
    init_sm_we = 1'b0;
    repeat (2) @(negedge clk);
    outq.delete(); rspq.delete();

    // 1. node 2 reads the block: READ_DATA with both chunks comes back
    drive(packet(2, ME, P_READ_REQ, GID, 0, 0, '0));
    expect_pkt(packet(ME, 2, P_READ_DATA, GID, 0, 2, init_data), "read served");

    // 2. node 2 reports it is valid again
    drive(packet(2, ME, P_UPDATE, GID, 1, 0, '0));
    repeat (10) @(posedge clk);
    check(dut.u_ld.tab[0].sh_valid == 3'b111 && dut.u_ld.tab[0].valid, "update kept sharers valid");

    // 3. PE write: token requests to 0, 2, 3
    pe(OP_WRITE, GID, wr_data);
    expect_pkts_any('{0, 2, 3}, P_TOKEN_REQ, GID, 0, "token requests");
    check(rspq.size() == 0, "write not done before tokens");
    p0 = packet(0, ME, P_TOKEN_RESP, GID, 0, 0, '0);
    p2 = packet(2, ME, P_TOKEN_RESP, GID, 0, 0, '0);
    p3 = packet(3, ME, P_TOKEN_RESP, GID, 0, 0, '0);
    drive(interleave(p0, p2, p3));
    expect_rsp(OP_WRITE, ST_DONE, 0, '0, "write done");
    expect_pkts_any('{0, 2, 3}, P_WRITE_OK, GID, 0, "write ok broadcast");
    check(dut.u_sm.mem[8] == wr_data[0] && dut.u_sm.mem[9] == wr_data[1], "write stored");
    check(dut.u_ld.tab[0].valid && dut.u_ld.tab[0].sh_valid == 3'b000,
          "only the writer is valid after the write");

    // 4. read hit returns the written data
    pe(OP_READ, GID, '0);
    expect_rsp(OP_READ, ST_DONE, 2, wr_data, "read hit");

    // 5. node 3 writes: its token request invalidates the copy here
    drive(packet(3, ME, P_TOKEN_REQ, GID, 0, 0, '0));
    expect_pkt(packet(ME, 3, P_TOKEN_RESP, GID, 0, 0, '0), "token returned");
    check(!dut.u_ld.tab[0].valid, "copy invalidated");
    drive(packet(3, ME, P_WRITE_OK, GID, 0, 0, '0));
    repeat (10) @(posedge clk);
    check(dut.u_ld.tab[0].sh_valid == 3'b100, "writer marked the only valid sharer");

    // 6. a read now misses and asks node 3 (first valid sharer)
    pe(OP_READ, GID, '0);
    expect_pkt(packet(ME, 3, P_READ_REQ, GID, 0, 0, '0), "read request to node 3");
    drive(packet(3, ME, P_READ_DATA, GID, 0, 2, init_data));
    expect_rsp(OP_READ, ST_DONE, 2, init_data, "remote read");
    expect_pkts_any('{0, 2, 3}, P_UPDATE, GID, 1, "update broadcast");

    repeat (20) @(posedge clk);
    check(outq.size() == 0, "no stray flits");
    check(rspq.size() == 0, "no stray responses");
    check(!rx_overflow, "no receive overflow");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
