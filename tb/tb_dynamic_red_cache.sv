// tb_dynamic_red_cache: self-checking testbench of dynamic_red_cache.
//
// The Red Cache is replaced by a scripted stand-in: each access keeps it
// busy for a few cycles and is a miss or a hit as a per-round table of
// miss counts per configuration decides, so every branch of the search can
// be forced (each block size and each associativity winning, ties, phases
// below and above the threshold). Small parameters are used (CDI = 8,
// PHASE_LEN = 32, threshold 25 %). Checked: the configuration applied to
// every access against the winner computed directly as the minimum of the
// table (first minimum on ties); the end-of-phase report (hits, misses,
// configuration); static mode; busy during the update cycle and the
// counter reset; the processor/memory forwarding.
`timescale 1ns/1ps
module tb_dynamic_red_cache;
  import rabed_pkg::*;

  localparam int CDI = 8, PL = 32, TH = 25;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        procRead = 0, procWrite = 0;
  logic [23:0] procAddr = '0;
  logic [31:0] dataFromProc = '0;
  logic        dataReadyForProc, busy;
  logic [31:0] dataToProc;
  logic        memRead, memWrite, dataReadyFromMem = 0;
  logic [23:0] addrToMem;
  logic [31:0] dataToMem, dataFromMem = '0;
  logic [31:0] Hits, Misses;
  logic        hitMissValuesReady;
  logic [1:0]  getAssociativeMode, getBlockSize;
  logic [1:0]  setCacheConfiguration = 2'b01, staticAssociativeMode = 2'b10, staticBlockSize = 2'b01;
  logic        rc_procRead, rc_procWrite, rc_busy, rc_dataReadyForProc;
  logic [23:0] rc_procAddr, rc_addrToMem = '0;
  logic [31:0] rc_dataFromProc, rc_dataToProc = '0, rc_dataToMem = '0, rc_dataFromMem;
  logic [1:0]  rc_setAssociativeMode, rc_setBlockSize;
  logic        rc_memRead = 0, rc_memWrite = 0, rc_dataReadyFromMem;
  logic [31:0] rc_Hits, rc_Misses;
  logic        rc_resetHitMissCounters;

  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dynamic_red_cache #(.CDI(CDI), .PHASE_LEN(PL), .MISS_THRESH_PCT(TH)) dut (.*);

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ stand-in
  int mtab [3][3];     // misses per CDI interval for (assoc, bsize)
  int phase_miss;      // misses per phase
  int idx;             // access index in the current interval
  bit next_miss;
  int busy_cnt;
  logic [31:0] h_q, m_q;
  assign rc_busy = (busy_cnt != 0);
  assign rc_Hits = h_q;
  assign rc_Misses = m_q;
  assign rc_dataReadyForProc = 1'b0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_cnt <= 0; h_q <= 0; m_q <= 0;
    end else begin
      if (busy_cnt != 0) busy_cnt <= busy_cnt - 1;
      if (rc_resetHitMissCounters) begin
        h_q <= 0; m_q <= 0;
        check(busy_cnt == 0, "counters cleared while the cache is idle");
      end else if (rc_procRead || rc_procWrite) begin
        check(busy_cnt == 0, "request forwarded only when idle");
        busy_cnt <= 1 + $urandom % 3;
        if (next_miss) m_q <= m_q + 1; else h_q <= h_q + 1;
      end
    end
  end

  // ------------------------------------------------------------ reports
  typedef struct { int unsigned h, m; int as, bs; } report_t;
  report_t act_q[$];
  always @(posedge clk)
    if (rst_n && hitMissValuesReady)
      act_q.push_back('{Hits, Misses, int'(getAssociativeMode), int'(getBlockSize)});

  // one access under configuration check; miss decided by 'limit'
  task automatic access(int exp_as, int exp_bs, int limit);
    @(negedge clk);
    while (busy) @(negedge clk);
    check(int'(rc_setAssociativeMode) == exp_as && int'(rc_setBlockSize) == exp_bs,
          $sformatf("config %0d/%0d expected %0d/%0d", rc_setAssociativeMode, rc_setBlockSize, exp_as, exp_bs));
    next_miss = (idx < limit);
    idx++;
    procRead = 1'b1;
    procAddr = 24'($urandom);
    @(negedge clk);
    procRead = 1'b0;
  endtask

  task automatic interval(int as, int bs, int len, int misses);
    idx = 0;
    for (int i = 0; i < len; i++) access(as, bs, misses);
    @(negedge clk);
    while (busy) @(negedge clk);
  endtask

  // one full search with a random table, then one phase; returns whether
  // the phase was over the threshold
  int n_bs_win [3], n_as_win [3], n_retune, n_keep;
  task automatic search_and_phase(bit over);
    int bbs, bas, bm;
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++) mtab[a][b] = $urandom % 4;   // ties are common
    // expected winners, straight from the definition
    bbs = 0; bm = mtab[0][0];
    for (int b = 1; b < 3; b++) if (mtab[0][b] < bm) begin bm = mtab[0][b]; bbs = b; end
    bas = 0;
    for (int a = 1; a < 3; a++) if (mtab[a][bbs] < bm) begin bm = mtab[a][bbs]; bas = a; end
    n_bs_win[bbs]++; n_as_win[bas]++;
    for (int b = 0; b < 3; b++) interval(0, b, CDI, mtab[0][b]);
    interval(1, bbs, CDI, mtab[1][bbs]);
    interval(2, bbs, CDI, mtab[2][bbs]);
    act_q.delete();
    phase_miss = over ? (PL * TH / 100) + 1 : (PL * TH / 100);
    interval(bas, bbs, PL, phase_miss);
    @(negedge clk);
    check(act_q.size() == 1, "one report per phase");
    if (act_q.size() == 1)
      check(act_q[0] == '{PL - phase_miss, phase_miss, bas, bbs},
            $sformatf("report %0d/%0d %0d/%0d expected %0d/%0d %0d/%0d",
                      act_q[0].h, act_q[0].m, act_q[0].as, act_q[0].bs, PL - phase_miss, phase_miss, bas, bbs));
    if (!over) begin
      // below threshold: the same configuration runs another phase
      act_q.delete();
      interval(bas, bbs, PL, 0);
      @(negedge clk);
      check(act_q.size() == 1 && act_q[0].m == 0 && act_q[0].as == bas, "kept phase report");
      n_keep++;
      // then force a retune
      interval(bas, bbs, PL, PL);
    end
    n_retune++;
  endtask

  int n_upd_busy = 0;
  always @(posedge clk) if (rst_n && busy && !rc_busy) n_upd_busy++;

  initial begin : main
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int r = 0; r < 30; r++) search_and_phase(r % 2);
    for (int b = 0; b < 3; b++) check(n_bs_win[b] > 0, $sformatf("block size %0d won", b));
    for (int a = 0; a < 3; a++) check(n_as_win[a] > 0, $sformatf("associativity %0d won", a));
    check(n_upd_busy > 0, "update cycles raise busy");

    // static mode: the running search is abandoned at the interval end
    setCacheConfiguration = 2'b00;
    interval(0, 0, CDI, 0);
    act_q.delete();
    interval(2, 1, PL, 3);
    interval(2, 1, PL, 30);          // above threshold, but static: no search
    @(negedge clk);
    check(act_q.size() == 2, "static phases reported");
    if (act_q.size() == 2) begin
      check(act_q[0] == '{PL - 3, 3, 2, 1}, "static phase 1 report");
      check(act_q[1] == '{PL - 30, 30, 2, 1}, "static phase 2 report");
    end
    // back to dynamic: a fresh search starts at direct-mapped, 16 words
    setCacheConfiguration = 2'b01;
    interval(2, 1, PL, 0);
    interval(0, 0, CDI, 0);
    interval(0, 1, CDI, 0);

    // forwarding
    @(negedge clk);
    rc_memRead = 1; rc_addrToMem = 24'hABCDEF; rc_dataToMem = 32'h1234_5678;
    dataReadyFromMem = 1; dataFromMem = 32'hCAFE_F00D; rc_dataToProc = 32'h0BAD_BEEF;
    #1;
    check(memRead && addrToMem == 24'hABCDEF && dataToMem == 32'h1234_5678, "memory request forwarded");
    check(rc_dataReadyFromMem && rc_dataFromMem == 32'hCAFE_F00D, "memory answer forwarded");
    check(dataToProc == 32'h0BAD_BEEF, "read data forwarded");
    rc_memRead = 0; dataReadyFromMem = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (500_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
