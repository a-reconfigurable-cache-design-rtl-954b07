// tb_red_cache: self-checking testbench of red_cache.
//
// Drives random reads and writes over a small address pool (few tags, few
// sets, so that hits, conflicts and LRU replacements all occur) in all nine
// configurations, switching configuration every few accesses, against the
// behavioural main memory. An independent reference model (tb_ref_pkg) predicts every hit or
// miss. Checked per access: read data against memory contents; hit/miss
// against the model; read-hit latency of one cycle; refill length of 16,
// 32 or 64 memory reads at the block-aligned addresses; one write-through
// per write with the right address and data; the Hits/Misses counters and
// their reset.
`timescale 1ns/1ps
module tb_red_cache;
  import rabed_pkg::*;

  localparam int N_ACCESS = 6000;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        procRead = 0, procWrite = 0;
  logic [23:0] procAddr = '0;
  logic [31:0] dataFromProc = '0;
  logic        dataReadyForProc, busy;
  logic [31:0] dataToProc;
  logic [1:0]  setAssociativeMode = 2'b00, setBlockSize = 2'b00;
  logic        memRead, memWrite, dataReadyFromMem;
  logic [23:0] addrToMem;
  logic [31:0] dataToMem, dataFromMem;
  logic [31:0] Hits, Misses;
  logic        resetHitMissCounters = 1'b0;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  red_cache dut (.*);

  tb_main_memory #(.MIN_LAT(1), .MAX_LAT(3)) u_mem (
    .clk, .rst_n, .memRead, .memWrite, .addrToMem, .dataToMem,
    .dataReadyFromMem, .dataFromMem
  );

  // ------------------------------------------------------------ reference
  tb_ref_pkg::ref_cache rm = new();
  int unsigned exp_hits, exp_misses;

  function automatic int grp(int bs);
    return tb_ref_pkg::ref_cache::blocks(bs);
  endfunction

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ monitors
  int          n_mem_reads, n_mem_writes;
  logic [23:0] last_wr_addr;
  logic [31:0] last_wr_data;
  logic [23:0] exp_fill_addr;
  int          fill_addr_err;
  always @(posedge clk) if (rst_n) begin
    if (memRead && dataReadyFromMem) begin
      if (addrToMem != exp_fill_addr) fill_addr_err++;
      exp_fill_addr = exp_fill_addr + 1;
      n_mem_reads++;
    end
    if (memWrite && dataReadyFromMem) begin
      n_mem_writes++;
      last_wr_addr = addrToMem;
      last_wr_data = dataToMem;
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic access(bit wr, logic [23:0] a, logic [31:0] wd, int assoc, int bs);
    int cyc = 0;
    bit exp_hit;
    int r0, w0;
    logic [31:0] got;
    logic [31:0] expect_data;
    @(negedge clk);
    while (busy) @(negedge clk);
    expect_data = u_mem.peek(a);
    exp_hit = rm.access(wr, a, assoc, bs);
    if (exp_hit) exp_hits++; else exp_misses++;
    r0 = n_mem_reads; w0 = n_mem_writes;
    exp_fill_addr = a & ~24'(grp(bs) * 16 - 1);
    fill_addr_err = 0;
    setAssociativeMode = 2'(assoc);
    setBlockSize = 2'(bs);
    procAddr = a;
    dataFromProc = wd;
    procRead = !wr;
    procWrite = wr;
    @(negedge clk);
    procRead = 0;
    procWrite = 0;
    if (!wr) begin
      while (!dataReadyForProc && cyc < 2000) begin
        @(negedge clk);
        cyc++;
      end
      got = dataToProc;
      check(got == expect_data, $sformatf("read data @%h got %h exp %h", a, got, expect_data));
      if (exp_hit) begin
        check(cyc == 0, $sformatf("hit latency %0d", cyc));
        check(n_mem_reads == r0, "memory read on a hit");
      end else begin
        check(cyc > 0, "miss answered without refill");
        check(n_mem_reads - r0 == grp(bs) * 16,
              $sformatf("refill length %0d exp %0d", n_mem_reads - r0, grp(bs) * 16));
        check(fill_addr_err == 0, "refill addresses");
      end
    end
    while (busy) @(negedge clk);
    if (wr) begin
      check(n_mem_writes - w0 == 1, "one write-through per write");
      check(last_wr_addr == a && last_wr_data == wd, "write-through address/data");
      check(n_mem_reads == r0, "no refill on a write");
    end
    check(Hits == exp_hits && Misses == exp_misses,
          $sformatf("counters %0d/%0d exp %0d/%0d", Hits, Misses, exp_hits, exp_misses));
  endtask

  int cfg_seen [3][3];
  int n_hits_cfg;

  initial begin : main
    int assoc, bs;
    exp_hits = 0; exp_misses = 0;
    n_mem_reads = 0; n_mem_writes = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    assoc = 0; bs = 0;
    for (int i = 0; i < N_ACCESS; i++) begin
      logic [23:0] a;
      bit wr;
      if (i % 40 == 0) begin
        assoc = $urandom % 3;
        bs = $urandom % 3;
        cfg_seen[assoc][bs]++;
      end
      a = {4'h0, 6'($urandom % 6), 2'($urandom), 4'h0, 4'($urandom % 3), 4'($urandom)};
      wr = ($urandom % 5) == 0;
      access(wr, a, $urandom, assoc, bs);
    end
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        check(cfg_seen[a][b] > 0, $sformatf("configuration %0d/%0d exercised", a, b));
    check(exp_hits > 500 && exp_misses > 500, "both hits and misses occurred");
    // counter reset
    @(negedge clk);
    resetHitMissCounters = 1;
    @(negedge clk);
    resetHitMissCounters = 0;
    check(Hits == 0 && Misses == 0, "counter reset");
    exp_hits = 0; exp_misses = 0;
    access(0, 24'h000123, 0, 2, 0);
    access(0, 24'h000123, 0, 2, 0);
    check(Hits == 1, "count after reset");
    $display("hits=%0d misses=%0d mem_reads=%0d mem_writes=%0d", exp_hits, exp_misses, n_mem_reads, n_mem_writes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
