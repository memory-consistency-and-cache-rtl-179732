// tb_coh_top: end-to-end test of the 2x2 coherence system at its default
// sizes.
//
// The four nodes are joined by the behavioural network model. After reset
// the testbench initialises every node's local directory and shared memory
// with five shared blocks (GID 100..104): 100 shared by nodes 0 and 2, 101 by
// 1 and 3, 102 by 0 and 1 (two sharers), 103 by 0, 1 and 2 (three sharers)
// and 104 by all four; every copy starts valid. It then plays the role of the
// processing elements, issuing timed READ and WRITE operations:
//   phases 1-3: the ten-operation schedule with two, three and four sharers
//               (sharers I..IV are nodes 0..3; times in ns, 2 ns per cycle),
//               then the twenty-operation schedule likewise; each prints
//               its completed and cancelled reads and writes;
//   phase 4:    every node reads block 104, then all four write it in the
//               same clock cycle (resolved by node priority);
//   phase 5:    a read that meets a write in progress at the responder,
//               and a write issued again while the first is pending;
//   phase 6:    a write whose token request reaches a node that has just
//               sent block data to a reader, at several offsets.
// A reference model keeps the value of the last completed write of each
// block. Every completed read must return it; after each phase every valid
// copy must hold it, at least one copy must be valid, no lock may remain, and
// a sharer that any directory lists as valid must itself be valid. Each
// protocol mechanism (read hit, remote read, invalidation, token, NACK,
// priority yield, ...) must occur at least once.
// The ten- and twenty-operation schedules and the block IDs 100..104 are
// those of the protocol's reference experiment; block lengths, sharer sets of
// blocks 100/101, the 2 ns clock and phases 4-6 are this testbench's own.
module tb_coh_top;
  import coh_pkg::*;

  localparam int unsigned ENTRIES = 100;     // coh_top default
  localparam int unsigned IW      = $clog2(ENTRIES);
  localparam int          N_GID   = 5;
  localparam int          MAX_OPS = 64;
  localparam int          WATCHDOG = 200000;

  typedef logic [MAX_WORDS-1:0][CHUNK_W-1:0] block_t;

  typedef struct {
    int   t;       // issue cycle, relative to phase start
    op_e  op;
    int   gid;
    block_t data;
  } pop_t;

  logic clk = 1'b0, rst_n = 1'b0;
  always #1 clk = ~clk;                       // 2 ns period

  pe_req_t            pe_req        [N_NODES];
  logic               pe_req_valid  [N_NODES];
  logic               pe_req_ready  [N_NODES];
  pe_rsp_t            pe_rsp        [N_NODES];
  logic               pe_rsp_valid  [N_NODES];
  logic [FLIT_W-1:0]  flit_out      [N_NODES];
  logic               flit_out_valid[N_NODES];
  logic               flit_out_ready[N_NODES];
  logic [FLIT_W-1:0]  flit_in       [N_NODES];
  logic               flit_in_valid [N_NODES];
  logic               flit_in_ready [N_NODES];
  node_t              init_node;
  logic               init_ld_we, init_sm_we;
  logic [IW-1:0]      init_ld_idx;
  ld_entry_t          init_ld_entry;
  logic [ADDR_W-1:0]  init_sm_addr;
  logic [CHUNK_W-1:0] init_sm_wdata;
  mc_ev_t             ev            [N_NODES];
  logic               rx_overflow   [N_NODES];

  coh_top dut (.*);

  noc_model #(.STALL_PCT(10)) u_noc (
    .clk, .rst_n,
    .src_flit(flit_out), .src_valid(flit_out_valid), .src_ready(flit_out_ready),
    .dst_flit(flit_in),  .dst_valid(flit_in_valid),  .dst_ready(flit_in_ready)
  );

  // ------------------------------------------------------------ scoreboard
  int checks = 0, failures = 0;
  int cyc = 0;

  int     gids    [N_GID] = '{100, 101, 102, 103, 104};
  int     glen    [N_GID] = '{1, 2, 2, 3, 4};
  logic [N_NODES-1:0] gmask [N_GID] = '{4'b0101, 4'b1010, 4'b0011, 4'b0111, 4'b1111};
  block_t golden  [N_GID];
  int     row_of  [N_NODES][N_GID];   // LD row of a block in a node, -1 if none

  pop_t   nops [N_NODES][MAX_OPS];
  int     ncnt [N_NODES];
  int     pidx [N_NODES];
  logic   running = 1'b0;
  int     phase_start = 0;
  int     issued = 0, responded = 0;

  // mechanism counters
  int n_read_hit, n_read_remote, n_read_done, n_read_cancel, n_read_served,
      n_read_nack, n_write_start, n_write_done, n_write_cancel,
      n_write_invalid, n_invalidated, n_token_withheld, n_write_yield,
      n_stale_drop, n_token_deferred;
  int n_rsp_rd_done, n_rsp_rd_cancel, n_rsp_wr_done, n_rsp_wr_cancel;

  function automatic int gidx(int gid);
    for (int i = 0; i < N_GID; i++) if (gids[i] == gid) return i;
    return -1;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // ------------------------------------------------------------ PE drivers
  always @(negedge clk) begin
    for (int n = 0; n < N_NODES; n++) begin
      if (running && pidx[n] < ncnt[n] && cyc - phase_start >= nops[n][pidx[n]].t) begin
        pe_req_valid[n] = 1'b1;
        pe_req[n].op    = nops[n][pidx[n]].op;
        pe_req[n].gid   = GID_W'(nops[n][pidx[n]].gid);
        pe_req[n].data  = nops[n][pidx[n]].data;
      end else begin
        pe_req_valid[n] = 1'b0;
        pe_req[n]       = '0;
      end
    end
  end

  always @(posedge clk) begin
    cyc++;
    for (int n = 0; n < N_NODES; n++) begin
      if (pe_req_valid[n] && pe_req_ready[n]) begin
        pidx[n]++;
        issued++;
      end
      if (rst_n) begin
        n_read_hit       += int'(ev[n].read_hit);
        n_read_remote    += int'(ev[n].read_remote);
        n_read_done      += int'(ev[n].read_done);
        n_read_cancel    += int'(ev[n].read_cancel);
        n_read_served    += int'(ev[n].read_served);
        n_read_nack      += int'(ev[n].read_nack);
        n_write_start    += int'(ev[n].write_start);
        n_write_done     += int'(ev[n].write_done);
        n_write_cancel   += int'(ev[n].write_cancel);
        n_write_invalid  += int'(ev[n].write_invalid);
        n_invalidated    += int'(ev[n].invalidated);
        n_token_withheld += int'(ev[n].token_withheld);
        n_write_yield    += int'(ev[n].write_yield);
        n_stale_drop     += int'(ev[n].stale_drop);
        n_token_deferred += int'(ev[n].token_deferred);
      end
      if (pe_rsp_valid[n]) begin
        int g;
        responded++;
        g = gidx(int'(pe_rsp[n].gid));
        check(g >= 0, $sformatf("node %0d response for unknown GID %0d", n, pe_rsp[n].gid));
        if (g >= 0) begin
          if (pe_rsp[n].status == ST_DONE && pe_rsp[n].op == OP_WRITE) begin
            n_rsp_wr_done++;
            golden[g] = pe_rsp[n].data;
          end else if (pe_rsp[n].status == ST_DONE) begin
            n_rsp_rd_done++;
            for (int w = 0; w < glen[g]; w++)
              check(pe_rsp[n].data[w] == golden[g][w],
                    $sformatf("node %0d read GID %0d word %0d: got %h expected %h",
                              n, gids[g], w, pe_rsp[n].data[w], golden[g][w]));
          end else if (pe_rsp[n].op == OP_WRITE) begin
            n_rsp_wr_cancel++;
          end else begin
            n_rsp_rd_cancel++;
          end
        end
      end
      if (rst_n) check(!rx_overflow[n], $sformatf("node %0d receive overflow", n));
    end
  end

  // Optional message trace (+trace): every message a controller takes in.
  bit trace;
  initial trace = $test$plusargs("trace");
  `define TB_TRACE_NODE(N) \
    always @(posedge clk) if (trace && dut.g_node[N].u_node.rx_valid && dut.g_node[N].u_node.rx_ready) \
      $display("%0d: node %0d <- node %0d %s gid %0d ext %0d", cyc, N, \
               dut.g_node[N].u_node.rx_msg.peer, dut.g_node[N].u_node.rx_msg.ptype.name(), \
               dut.g_node[N].u_node.rx_msg.gid, dut.g_node[N].u_node.rx_msg.ext);
  `TB_TRACE_NODE(0)
  `TB_TRACE_NODE(1)
  `TB_TRACE_NODE(2)
  `TB_TRACE_NODE(3)
  always @(posedge clk) if (trace) for (int n = 0; n < N_NODES; n++) begin
    if (pe_req_valid[n] && pe_req_ready[n])
      $display("%0d: node %0d PE %s gid %0d", cyc, n, pe_req[n].op.name(), pe_req[n].gid);
    if (pe_rsp_valid[n])
      $display("%0d: node %0d PE rsp %s gid %0d %s", cyc, n, pe_rsp[n].op.name(), pe_rsp[n].gid, pe_rsp[n].status.name());
  end

  // ------------------------------------------------------- state inspection
  function automatic ld_entry_t ld_row(int n, int r);
    case (n)
      0: return dut.g_node[0].u_node.u_ld.tab[r];
      1: return dut.g_node[1].u_node.u_ld.tab[r];
      2: return dut.g_node[2].u_node.u_ld.tab[r];
      default: return dut.g_node[3].u_node.u_ld.tab[r];
    endcase
  endfunction

  function automatic logic [CHUNK_W-1:0] sm_word(int n, int a);
    case (n)
      0: return dut.g_node[0].u_node.u_sm.mem[a];
      1: return dut.g_node[1].u_node.u_sm.mem[a];
      2: return dut.g_node[2].u_node.u_sm.mem[a];
      default: return dut.g_node[3].u_node.u_sm.mem[a];
    endcase
  endfunction

  function automatic logic mc_lock(int n, int r);
    case (n)
      0: return dut.g_node[0].u_node.u_mc.lock[r];
      1: return dut.g_node[1].u_node.u_mc.lock[r];
      2: return dut.g_node[2].u_node.u_mc.lock[r];
      default: return dut.g_node[3].u_node.u_mc.lock[r];
    endcase
  endfunction

  task automatic check_coherence(input string tag);
    for (int g = 0; g < N_GID; g++) begin
      int nvalid = 0;
      for (int n = 0; n < N_NODES; n++) begin
        ld_entry_t e;
        if (!gmask[g][n]) continue;
        e = ld_row(n, row_of[n][g]);
        check(e.used && int'(e.gid) == gids[g], $sformatf("%s: node %0d LD row of GID %0d", tag, n, gids[g]));
        check(!mc_lock(n, row_of[n][g]), $sformatf("%s: node %0d still locked on GID %0d", tag, n, gids[g]));
        if (e.valid) begin
          nvalid++;
          for (int w = 0; w < glen[g]; w++)
            check(sm_word(n, int'(e.addr) + w) == golden[g][w],
                  $sformatf("%s: node %0d GID %0d word %0d holds %h expected %h",
                            tag, n, gids[g], w, sm_word(n, int'(e.addr) + w), golden[g][w]));
        end
        for (int s = 0; s < N_SH; s++) begin
          if (e.sh_used[s] && e.sh_valid[s]) begin
            ld_entry_t o;
            o = ld_row(int'(e.sh_node[s]), row_of[int'(e.sh_node[s])][g]);
            check(o.valid, $sformatf("%s: node %0d lists node %0d valid for GID %0d but it is not",
                                     tag, n, e.sh_node[s], gids[g]));
          end
        end
      end
      check(nvalid > 0, $sformatf("%s: no valid copy of GID %0d", tag, gids[g]));
    end
  endtask

  // --------------------------------------------------------------- phases
  task automatic clear_ops();
    for (int n = 0; n < N_NODES; n++) begin
      ncnt[n] = 0;
      pidx[n] = 0;
    end
  endtask

  task automatic add_op(input int t, input int n, input op_e op, input int gid, input int tag);
    block_t d;
    for (int w = 0; w < MAX_WORDS; w++) d[w] = 32'hD000_0000 | (tag << 8) | w;
    nops[n][ncnt[n]] = '{t: t, op: op, gid: gid, data: d};
    ncnt[n]++;
  endtask

  task automatic run_phase(input string tag, input int total);
    int quiet;
    int rd0, rc0, wd0, wc0, last;
    rd0 = n_rsp_rd_done; rc0 = n_rsp_rd_cancel; wd0 = n_rsp_wr_done; wc0 = n_rsp_wr_cancel;
    issued    = 0;
    responded = 0;
    phase_start = cyc;
    running = 1'b1;
    while (issued < total || responded < total) @(posedge clk);
    running = 1'b0;
    last = cyc - phase_start;
    // let trailing messages (UPDATE, WRITE_OK) settle
    quiet = 0;
    while (quiet < 60) begin
      @(posedge clk);
      quiet++;
      for (int n = 0; n < N_NODES; n++)
        if (flit_out_valid[n] || flit_in_valid[n]) quiet = 0;
    end
    check(responded == total, $sformatf("%s: %0d responses for %0d operations", tag, responded, total));
    check_coherence(tag);
    $display("%s done at cycle %0d (%0d cycles)", tag, cyc, cyc - phase_start);
    $display("  reads done %0d cancelled %0d, writes done %0d cancelled %0d, last response at %0d ns",
             n_rsp_rd_done - rd0, n_rsp_rd_cancel - rc0, n_rsp_wr_done - wd0, n_rsp_wr_cancel - wc0,
             2 * last);
  endtask

  // Ten-operation schedule: sharer (I..IV) per case, operation, time in ns.
  int t51_2s [10] = '{0, 1, 0, 1, 1, 0, 0, 1, 0, 1};
  int t51_3s [10] = '{0, 1, 2, 1, 1, 0, 2, 1, 0, 1};
  int t51_4s [10] = '{0, 1, 2, 1, 3, 0, 3, 1, 0, 1};
  op_e t51_op[10] = '{OP_WRITE, OP_READ, OP_READ, OP_WRITE, OP_READ,
                      OP_READ, OP_WRITE, OP_READ, OP_WRITE, OP_WRITE};
  int t51_ns [10] = '{89, 300, 305, 315, 325, 344, 556, 590, 600, 740};

  task automatic table_phase(input int which, input int gid);
    clear_ops();
    for (int i = 0; i < 10; i++) begin
      int n;
      n = (which == 2) ? t51_2s[i] : (which == 3) ? t51_3s[i] : t51_4s[i];
      add_op(t51_ns[i] / 2, n, t51_op[i], gid, which * 16 + i);
    end
    run_phase($sformatf("table 5.1 %0dS (GID %0d)", which, gid), 10);
  endtask

  // Twenty-operation schedule, same layout (sharers I..IV are 0..3).
  int t52_2s [20] = '{0, 1, 0, 1, 1, 0, 0, 1, 0, 1, 0, 1, 0, 1, 1, 0, 0, 1, 1, 0};
  int t52_3s [20] = '{0, 1, 2, 1, 2, 0, 0, 1, 2, 1, 0, 1, 0, 2, 1, 0, 0, 1, 1, 2};
  int t52_4s [20] = '{0, 1, 2, 3, 2, 1, 0, 2, 2, 1, 3, 1, 0, 2, 1, 0, 3, 2, 0, 2};
  op_e t52_op[20] = '{OP_WRITE, OP_READ, OP_READ, OP_WRITE, OP_READ,
                      OP_READ, OP_WRITE, OP_READ, OP_WRITE, OP_WRITE,
                      OP_WRITE, OP_READ, OP_READ, OP_WRITE, OP_READ,
                      OP_READ, OP_WRITE, OP_READ, OP_WRITE, OP_WRITE};
  int t52_ns [20] = '{89, 300, 305, 315, 325, 344, 556, 590, 600, 740,
                      889, 900, 950, 1100, 1120, 1130, 1201, 1204, 1299, 1390};

  task automatic table52_phase(input int which, input int gid);
    clear_ops();
    for (int i = 0; i < 20; i++) begin
      int n;
      n = (which == 2) ? t52_2s[i] : (which == 3) ? t52_3s[i] : t52_4s[i];
      add_op(t52_ns[i] / 2, n, t52_op[i], gid, 128 + which * 32 + i);
    end
    run_phase($sformatf("table 5.2 %0dS (GID %0d)", which, gid), 20);
  endtask

  // Initialisation: directories and shared data of every node; every copy
  // valid. Also used to restart from the initial state between schedules.
  task automatic init_all();
    for (int n = 0; n < N_NODES; n++) begin
      int r;
      r = 0;
      for (int g = 0; g < N_GID; g++) begin
        row_of[n][g] = -1;
        if (!gmask[g][n]) continue;
        row_of[n][g] = r;
        @(negedge clk);
        init_node              = node_t'(n);
        init_ld_we             = 1'b1;
        init_ld_idx            = IW'(r);
        init_ld_entry          = '0;
        init_ld_entry.used     = 1'b1;
        init_ld_entry.gid      = GID_W'(gids[g]);
        init_ld_entry.addr     = ADDR_W'(r * MAX_WORDS);
        init_ld_entry.len      = LEN_W'(glen[g]);
        init_ld_entry.valid    = 1'b1;
        begin
          int s;
          s = 0;
          for (int m = 0; m < N_NODES; m++) begin
            if (m == n || !gmask[g][m]) continue;
            init_ld_entry.sh_used[s]  = 1'b1;
            init_ld_entry.sh_node[s]  = node_t'(m);
            init_ld_entry.sh_valid[s] = 1'b1;
            s++;
          end
        end
        for (int w = 0; w < glen[g]; w++) begin
          golden[g][w] = 32'(gids[g] << 16 | w);
          @(negedge clk);
          init_ld_we    = 1'b0;
          init_sm_we    = 1'b1;
          init_sm_addr  = ADDR_W'(r * MAX_WORDS + w);
          init_sm_wdata = golden[g][w];
        end
        @(negedge clk);
        init_sm_we = 1'b0;
        r++;
      end
    end
  endtask

  // --------------------------------------------------------------- main
  initial begin
    for (int n = 0; n < N_NODES; n++) begin
      pe_req_valid[n] = 1'b0;
      pe_req[n]       = '0;
      ncnt[n]         = 0;
      pidx[n]         = 0;
    end
    init_node = '0; init_ld_we = 1'b0; init_sm_we = 1'b0;
    init_ld_idx = '0; init_ld_entry = '0; init_sm_addr = '0; init_sm_wdata = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);

    init_all();
    @(posedge clk);
    check_coherence("after initialisation");

    table_phase(2, 102);
    table_phase(3, 103);
    table_phase(4, 104);
    init_all();
    @(posedge clk);
    check_coherence("after second initialisation");
    table52_phase(2, 102);
    table52_phase(3, 103);
    table52_phase(4, 104);

    // Phase 4: all sharers make their copy valid, then write together.
    clear_ops();
    for (int n = 0; n < N_NODES; n++) add_op(n * 40, n, OP_READ, 104, 80 + n);
    for (int n = 0; n < N_NODES; n++) add_op(400, n, OP_WRITE, 104, 90 + n);
    run_phase("simultaneous writes (GID 104)", 8);

    // Phase 5: node 1 reads block 102 while node 0 is writing it.
    clear_ops();
    add_op(0,   0, OP_READ,  102, 100);
    add_op(100, 0, OP_WRITE, 102, 101);
    add_op(300, 0, OP_WRITE, 102, 102);
    add_op(300, 1, OP_READ,  102, 103);
    add_op(302, 0, OP_WRITE, 102, 104);
    run_phase("read against write in progress (GID 102)", 5);

    // Phase 6: a writer's token request reaches a node that has just sent
    // block data to a reader; the token must wait for the reader's UPDATE.
    for (int off = 4; off <= 24; off += 4) begin
      clear_ops();
      add_op(0,         0, OP_READ,  104, 110);
      add_op(60,        0, OP_WRITE, 104, 111);
      add_op(150,       3, OP_READ,  104, 112);
      add_op(250,       1, OP_READ,  104, 113);
      add_op(250 + off, 3, OP_WRITE, 104, 114 + off);
      run_phase($sformatf("write meets a read being served (offset %0d)", off), 5);
    end

    $display("mechanisms: read_hit=%0d read_remote=%0d read_done=%0d read_cancel=%0d read_served=%0d read_nack=%0d",
             n_read_hit, n_read_remote, n_read_done, n_read_cancel, n_read_served, n_read_nack);
    $display("            write_start=%0d write_done=%0d write_cancel=%0d write_invalid=%0d invalidated=%0d",
             n_write_start, n_write_done, n_write_cancel, n_write_invalid, n_invalidated);
    $display("            token_withheld=%0d write_yield=%0d stale_drop=%0d token_deferred=%0d",
             n_token_withheld, n_write_yield, n_stale_drop, n_token_deferred);
    $display("responses:  reads done=%0d cancelled=%0d, writes done=%0d cancelled=%0d",
             n_rsp_rd_done, n_rsp_rd_cancel, n_rsp_wr_done, n_rsp_wr_cancel);
    check(n_read_hit > 0,       "read hit never happened");
    check(n_read_remote > 0,    "remote read never happened");
    check(n_read_done > 0,      "remote read never completed");
    check(n_read_cancel > 0,    "read cancellation never happened");
    check(n_read_served > 0,    "read data never served");
    check(n_read_nack > 0,      "read NACK never happened");
    check(n_write_start > 0,    "write never started");
    check(n_write_done > 0,     "write never completed");
    check(n_write_cancel > 0,   "busy-write cancellation never happened");
    check(n_write_invalid > 0,  "write to Invalid copy never refused");
    check(n_invalidated > 0,    "invalidation never happened");
    check(n_token_withheld > 0, "token never withheld by priority");
    check(n_write_yield > 0,    "write never yielded by priority");
    check(n_token_deferred > 0, "token never deferred behind a served read");
    check(n_stale_drop > 0,     "stale message never dropped");
    check(n_read_done == n_rsp_rd_done - n_read_hit, "remote read count does not match responses");
    check(n_write_done == n_rsp_wr_done, "write count does not match responses");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired at cycle %0d", cyc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
