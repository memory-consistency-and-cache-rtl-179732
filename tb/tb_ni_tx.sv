// tb_ni_tx: checks the network-interface send side. Random messages (zero
// to four data chunks, random destinations and protocol words) are offered;
// the receiving side stalls at random. Every flit is decoded here bit by bit
// from the flit layout (TYP 39:36, ID 35:32, SX 31:28, SY 27:24, DX 19:16,
// DY 15:12; protocol word P_TYPE 31:28, P_GID 27:11, P_EXTENSION 10:0) and
// compared with the message. Without stalls a packet of n chunks must take
// exactly n+3 cycles.
// The flit fields are checked against the published flit formats; the
// numeric flit-type codes and the n+3 cycle timing are this design's own.
module tb_ni_tx;
  import coh_pkg::*;

  localparam int NODE_ID = 2;             // node "10": x=1, y=0

  logic              clk = 1'b0, rst_n = 1'b0;
  msg_t              msg;
  logic              msg_valid, msg_ready;
  logic [FLIT_W-1:0] flit;
  logic              flit_valid, flit_ready;
  int checks = 0, failures = 0;
  bit stall_on = 1'b1;

  always #5 clk = ~clk;

  ni_tx #(.NODE_ID(NODE_ID)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  always @(negedge clk) flit_ready = stall_on ? (($urandom % 3) != 0) : 1'b1;

  task automatic get_flit(output logic [FLIT_W-1:0] f, inout int cycles);
    do begin
      @(posedge clk);
      cycles++;
    end while (!(flit_valid && flit_ready));
    f = flit;
  endtask

  task automatic one(input int nw);
    msg_t m;
    logic [FLIT_W-1:0] f;
    int cycles = 0;
    m = '0;
    m.peer   = node_t'($urandom % N_NODES);
    m.ptype  = ptype_e'(1 + $urandom % 7);
    m.gid    = GID_W'($urandom);
    m.ext    = PEXT_W'($urandom);
    m.nwords = LEN_W'(nw);
    for (int w = 0; w < MAX_WORDS; w++) m.data[w] = $urandom;
    @(negedge clk);
    msg = m; msg_valid = 1'b1;
    @(posedge clk);
    check(msg_ready, "not ready when idle");
    @(negedge clk);
    msg_valid = 1'b0;
    // header
    get_flit(f, cycles);
    check(f[39:36] == 4'd1, "header TYP");
    check(f[35:32] == 4'(NODE_ID), "header ID");
    check(f[31:28] == 4'd1 && f[27:24] == 4'd0, "source coordinates");
    check(f[19:16] == 4'(int'(m.peer) / 2) && f[15:12] == 4'(int'(m.peer) % 2),
          $sformatf("destination coordinates %h for node %0d", f[19:8], m.peer));
    // protocol word
    get_flit(f, cycles);
    check(f[39:36] == 4'd2, "protocol body TYP");
    check(f[31:28] == 4'(m.ptype) && f[27:11] == m.gid && f[10:0] == m.ext, "protocol word");
    for (int w = 0; w < nw; w++) begin
      get_flit(f, cycles);
      check(f[39:36] == 4'd2 && f[31:0] == m.data[w], $sformatf("data chunk %0d", w));
    end
    get_flit(f, cycles);
    check(f[39:36] == 4'd3, "tail TYP");
    if (!stall_on) check(cycles == nw + 3, $sformatf("%0d chunks took %0d cycles", nw, cycles));
  endtask

  initial begin
    msg = '0; msg_valid = 1'b0; flit_ready = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 100; i++) one(i % (MAX_WORDS + 1));
    stall_on = 1'b0;
    for (int i = 0; i < 20; i++) one(i % (MAX_WORDS + 1));
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
