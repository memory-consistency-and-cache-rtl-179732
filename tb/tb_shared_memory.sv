// tb_shared_memory: checks the node's shared-memory array. Random writes go
// to a shadow copy kept by the testbench; every read must return the shadow
// value exactly one cycle after the address is given, and a read of the
// address being written in the same cycle returns the old value.
// Memory kept in 32-bit chunks follows the protocol description; the
// single-port read-before-write timing is this design's own choice.
module tb_shared_memory;
  import coh_pkg::*;

  localparam int unsigned WORDS = 64;

  logic               clk = 1'b0;
  logic               we;
  logic [ADDR_W-1:0]  addr;
  logic [CHUNK_W-1:0] wdata, rdata;
  logic [CHUNK_W-1:0] shadow [WORDS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  shared_memory #(.WORDS(WORDS)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    we = 1'b0; addr = '0; wdata = '0;
    // fill
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b1; addr = ADDR_W'(a); wdata = $urandom; shadow[a] = wdata;
    end
    // read back: data is there one cycle after the address
    for (int a = 0; a < WORDS; a++) begin
      @(negedge clk);
      we = 1'b0; addr = ADDR_W'(a);
      @(negedge clk);
      check(rdata == shadow[a], $sformatf("read %0d: %h vs %h", a, rdata, shadow[a]));
    end
    // mixed random traffic
    for (int i = 0; i < 400; i++) begin
      int a;
      logic [CHUNK_W-1:0] old;
      @(negedge clk);
      a = $urandom % WORDS;
      we = ($urandom % 2) == 1; addr = ADDR_W'(a); wdata = $urandom;
      old = shadow[a];
      if (we) shadow[a] = wdata;
      @(negedge clk);
      check(rdata == old, $sformatf("cycle %0d addr %0d: %h vs %h (read-before-write)", i, a, rdata, old));
      we = 1'b0;
      @(negedge clk);
      check(rdata == shadow[a], $sformatf("cycle %0d addr %0d after write: %h vs %h", i, a, rdata, shadow[a]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
