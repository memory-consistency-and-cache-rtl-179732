// tb_local_directory: checks the local directory table. Rows with random
// global IDs and sharer lists are written; lookups of every written ID must
// hit the right row and return the written contents, lookups of absent IDs
// must miss, rows can be replaced, an unused row never matches, the lowest
// row wins when two rows carry the same ID, random IDs (some differing from
// a stored one only in their upper bits) hit or miss as a reference search
// of the table says, and reset empties the table.
// The row fields follow the protocol's directory entry; the table size,
// lookup priority and reset behaviour checked here are this design's own.
module tb_local_directory;
  import coh_pkg::*;

  localparam int unsigned ENTRIES = 16;
  localparam int unsigned IW = $clog2(ENTRIES);

  logic             clk = 1'b0, rst_n = 1'b0;
  logic [GID_W-1:0] lk_gid;
  logic             lk_hit;
  logic [IW-1:0]    lk_idx;
  ld_entry_t        lk_entry;
  logic             we;
  logic [IW-1:0]    widx;
  ld_entry_t        wentry;
  ld_entry_t        model [ENTRIES];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  local_directory #(.ENTRIES(ENTRIES)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic ld_entry_t rand_entry(int gid);
    ld_entry_t e;
    e = ld_entry_t'({$urandom, $urandom, $urandom});
    e.used = 1'b1;
    e.gid  = GID_W'(gid);
    return e;
  endfunction

  task automatic write_row(input int r, input ld_entry_t e);
    @(negedge clk);
    we = 1'b1; widx = IW'(r); wentry = e; model[r] = e;
    @(negedge clk);
    we = 1'b0;
  endtask

  task automatic lookup(input int gid, input bit exp_hit, input int exp_row);
    lk_gid = GID_W'(gid);
    #1;
    check(lk_hit == exp_hit, $sformatf("gid %0d hit %0b expected %0b", gid, lk_hit, exp_hit));
    if (exp_hit) begin
      check(int'(lk_idx) == exp_row, $sformatf("gid %0d row %0d expected %0d", gid, lk_idx, exp_row));
      check(lk_entry == model[exp_row], $sformatf("gid %0d entry contents", gid));
    end
  endtask

  initial begin
    we = 1'b0; widx = '0; wentry = '0; lk_gid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    lookup(0, 0, 0);
    for (int r = 0; r < ENTRIES; r++) write_row(r, rand_entry(1000 + 7 * r));
    for (int r = 0; r < ENTRIES; r++) lookup(1000 + 7 * r, 1, r);
    for (int i = 0; i < 50; i++) lookup(50000 + i, 0, 0);
    // replace a row's sharer validity
    begin
      ld_entry_t e;
      e = model[5];
      e.valid = ~e.valid;
      e.sh_valid = ~e.sh_valid;
      write_row(5, e);
      lookup(1035, 1, 5);
    end
    // unused rows never match
    begin
      ld_entry_t e;
      e = rand_entry(1042);
      e.used = 1'b0;
      write_row(6, e);
      lookup(1042, 0, 0);
    end
    // duplicate ID: lowest row wins
    write_row(9, rand_entry(1014));
    lookup(1014, 1, 2);
    write_row(1, rand_entry(1014));
    lookup(1014, 1, 1);
    // random IDs over the full 17-bit range, including IDs that differ from
    // a stored one only in their upper bits; the model finds the lowest
    // used row with an equal ID
    for (int r = 0; r < ENTRIES; r++) write_row(r, rand_entry(int'($urandom % (1 << GID_W))));
    for (int i = 0; i < 400; i++) begin
      int g, exp_row;
      if (i % 2 == 0) g = int'(model[$urandom % ENTRIES].gid) ^ (1 << (8 + $urandom % (GID_W - 8)));
      else            g = int'(model[$urandom % ENTRIES].gid);
      exp_row = -1;
      for (int r = ENTRIES - 1; r >= 0; r--)
        if (model[r].used && int'(model[r].gid) == g) exp_row = r;
      lookup(g, exp_row >= 0, exp_row < 0 ? 0 : exp_row);
    end
    // reset clears the table
    @(negedge clk);
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < ENTRIES; r++) lookup(1000 + 7 * r, 0, 0);
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
