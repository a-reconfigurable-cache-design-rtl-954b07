// tb_rabed: end-to-end, full-size testbench of the complete cache (rabed)
// with every parameter at its default.
//
// A processor model runs several access patterns back to back against the
// behavioural main memory:
//   loop    reads and writes over 4 blocks that share sets and way-select
//           bits, so that direct-mapped and 2-way thrash and 4-way holds them;
//   stream  sequential reads, where larger blocks miss less;
//   random  reads spread over the whole address space, missing almost
//           always, which pushes phases over the miss-rate threshold;
// first in dynamic mode, then in static mode (2-way, 32 words), then
// dynamic again. Independent models predict (a) the hit or miss of every
// access (tb_ref_pkg) and (b) the configuration the controller must apply
// to every access, following the two-stage search over 128-access
// intervals, 1024-access phases and the 10 % retune threshold.
// Checked: read data against memory, hit latency of one cycle, hit/miss,
// the configuration used for every access, and every end-of-phase report
// (Hits, Misses, associativity, block size). Each mechanism (read hit,
// refill of each block size, write hit and miss, each of the nine
// configurations, a finished search, a kept phase, a retune, a static
// phase, a mode switch, a busy update cycle) must happen at least once,
// and the search run on the conflict loop must end on 4-way.
`timescale 1ns/1ps
module tb_rabed;
  import rabed_pkg::*;

  localparam int CDI = 128, PHASE_LEN = 1024, THRESH = 10;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        procRead = 0, procWrite = 0;
  logic [23:0] procAddr = '0;
  logic [31:0] dataFromProc = '0;
  logic        dataReadyForProc, busy;
  logic [31:0] dataToProc;
  logic        memRead, memWrite, dataReadyFromMem;
  logic [23:0] addrToMem;
  logic [31:0] dataToMem, dataFromMem;
  logic [31:0] Hits, Misses;
  logic        hitMissValuesReady;
  logic [1:0]  getAssociativeMode, getBlockSize;
  logic [1:0]  setCacheConfiguration = 2'b01;
  logic [1:0]  staticAssociativeMode = 2'b01, staticBlockSize = 2'b01;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  rabed dut (.*);

  tb_main_memory #(.MIN_LAT(1), .MAX_LAT(3)) u_mem (
    .clk, .rst_n, .memRead, .memWrite, .addrToMem, .dataToMem,
    .dataReadyFromMem, .dataFromMem
  );

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  // ------------------------------------------------------------ phase reports
  typedef struct { int unsigned h, m; int as, bs; } report_t;
  report_t exp_q[$], act_q[$];
  always @(posedge clk)
    if (rst_n && hitMissValuesReady)
      act_q.push_back('{Hits, Misses, int'(getAssociativeMode), int'(getBlockSize)});

  // ------------------------------------------------------------ mechanisms
  int n_read_hit, n_write_hit, n_write_miss, n_search_done, n_retune;
  int n_phase_kept, n_static_phase, n_mode_switch, n_update_cycles;
  int n_refill [3];
  int cfg_used [3][3];
  always @(posedge clk)
    if (rst_n && busy && !dut.u_red.busy) n_update_cycles++;

  // ------------------------------------------------------------ models
  tb_ref_pkg::ref_cache rm = new();

  bit booted = 0;
  bit dyn_cur;
  int step;                  // 0..4 search steps, 5 = phase
  int cur_as, cur_bs;        // dynamic configuration
  int best_bs, best_as;
  int unsigned best_m;
  int acc_cnt;
  int unsigned int_hits, int_misses;

  function automatic int cur_len();
    return (dyn_cur && step != 5) ? CDI : PHASE_LEN;
  endfunction

  function automatic void exp_cfg(output int as, output int bs);
    if (dyn_cur) begin
      as = cur_as; bs = cur_bs;
    end else begin
      as = int'(staticAssociativeMode); bs = int'(staticBlockSize);
    end
  endfunction

  // interval bookkeeping of the controller model, run after each access
  function automatic void interval_end();
    bit dyn_next = (setCacheConfiguration == 2'b01);
    int as, bs;
    exp_cfg(as, bs);
    if (!dyn_cur || step == 5) begin
      exp_q.push_back('{int_hits, int_misses, as, bs});
      if (!dyn_cur) n_static_phase++;
    end
    if (dyn_next != dyn_cur) n_mode_switch++;
    if (!dyn_next || !dyn_cur) begin
      step = 0; cur_as = 0; cur_bs = 0;
    end else begin
      case (step)
        0: begin best_m = int_misses; best_bs = 0; cur_bs = 1; step = 1; end
        1: begin if (int_misses < best_m) begin best_m = int_misses; best_bs = 1; end
                 cur_bs = 2; step = 2; end
        2: begin if (int_misses < best_m) begin best_m = int_misses; best_bs = 2; end
                 best_as = 0; cur_bs = best_bs; cur_as = 1; step = 3; end
        3: begin if (int_misses < best_m) begin best_m = int_misses; best_as = 1; end
                 cur_as = 2; step = 4; end
        4: begin if (int_misses < best_m) begin best_m = int_misses; best_as = 2; end
                 cur_as = best_as; step = 5; n_search_done++; end
        default: begin
          if (int_misses * 100 > THRESH * PHASE_LEN) begin
            step = 0; cur_as = 0; cur_bs = 0; n_retune++;
          end else n_phase_kept++;
        end
      endcase
    end
    dyn_cur = dyn_next;
    acc_cnt = 0; int_hits = 0; int_misses = 0;
  endfunction

  // ------------------------------------------------------------ processor
  task automatic access(bit wr, logic [23:0] a, logic [31:0] wd);
    int cyc = 0, as, bs, r0;
    bit hit;
    logic [31:0] expect_data;
    @(negedge clk);
    while (busy) @(negedge clk);
    if (!booted) begin
      booted = 1;
      dyn_cur = (setCacheConfiguration == 2'b01);
    end
    exp_cfg(as, bs);
    check(int'(dut.u_red.setAssociativeMode) == as && int'(dut.u_red.setBlockSize) == bs,
          $sformatf("configuration %0d/%0d expected %0d/%0d (step %0d)",
                    dut.u_red.setAssociativeMode, dut.u_red.setBlockSize, as, bs, step));
    cfg_used[as][bs]++;
    expect_data = u_mem.peek(a);
    hit = rm.access(wr, a, as, bs);
    if (hit) int_hits++; else int_misses++;
    r0 = u_mem.reads;
    procAddr = a; dataFromProc = wd;
    procRead = !wr; procWrite = wr;
    @(negedge clk);
    procRead = 0; procWrite = 0;
    if (!wr) begin
      while (!dataReadyForProc && cyc < 5000) begin
        @(negedge clk);
        cyc++;
      end
      check(dataToProc == expect_data,
            $sformatf("read @%h got %h expected %h", a, dataToProc, expect_data));
      check((cyc == 0) == hit, $sformatf("hit/miss @%h latency %0d, model hit=%0d", a, cyc, hit));
      if (hit) n_read_hit++;
      else begin
        n_refill[bs]++;
        check(u_mem.reads - r0 == tb_ref_pkg::ref_cache::blocks(bs) * 16, "refill length");
      end
    end else begin
      if (hit) n_write_hit++; else n_write_miss++;
    end
    while (busy) @(negedge clk);
    if (wr) check(u_mem.peek(a) == wd, "write-through reached memory");
    acc_cnt++;
    if (acc_cnt == cur_len()) interval_end();
  endtask

  // ------------------------------------------------------------ workloads
  task automatic run_loop(int n);
    for (int i = 0; i < n; i++) begin
      logic [23:0] a = {6'($urandom % 4), 6'h00, 4'h0, 4'($urandom % 16), 4'($urandom)};
      // the 4 blocks differ in address bits 23:18 only: same set, same
      // direct-mapped way, same 2-way pair
      access(($urandom % 7) == 0, a, $urandom);
    end
  endtask

  logic [23:0] stream_ptr = 24'h40_0000;
  task automatic run_stream(int n);
    for (int i = 0; i < n; i++) begin
      access(1'b0, stream_ptr, '0);
      stream_ptr++;
    end
  endtask

  task automatic run_random(int n);
    for (int i = 0; i < n; i++) access(1'b0, 24'($urandom), '0);
  endtask

  initial begin : main
    int_hits = 0; int_misses = 0; acc_cnt = 0; step = 0; cur_as = 0; cur_bs = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    run_loop(3000);
    run_stream(4000);
    run_random(2600);
    run_loop(1500);
    setCacheConfiguration = 2'b00;       // static: 2-way, 32 words
    run_loop(2500);
    setCacheConfiguration = 2'b01;       // back to dynamic
    run_loop(2500);
    repeat (5) @(negedge clk);

    check(act_q.size() == exp_q.size(),
          $sformatf("%0d phase reports, expected %0d", act_q.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < act_q.size(); i++)
      check(act_q[i] == exp_q[i],
            $sformatf("phase %0d report %0d/%0d %0d/%0d expected %0d/%0d %0d/%0d", i,
                      act_q[i].h, act_q[i].m, act_q[i].as, act_q[i].bs,
                      exp_q[i].h, exp_q[i].m, exp_q[i].as, exp_q[i].bs));

    foreach (exp_q[i]) $display("phase %0d: hits %0d misses %0d assoc %0d bsize %0d", i, exp_q[i].h, exp_q[i].m, exp_q[i].as, exp_q[i].bs);
    $display("read hits %0d, refills 16/32/64: %0d/%0d/%0d, write hits %0d, write misses %0d",
             n_read_hit, n_refill[0], n_refill[1], n_refill[2], n_write_hit, n_write_miss);
    $display("searches %0d, retunes %0d, phases kept %0d, static phases %0d, mode switches %0d, update cycles %0d",
             n_search_done, n_retune, n_phase_kept, n_static_phase, n_mode_switch, n_update_cycles);
    // the conflict loop thrashes direct-mapped and 2-way: the first search
    // must settle on 4-way
    check(exp_q.size() > 0 && exp_q[0].as == 2, "first search chose 4-way for the conflict loop");
    check(n_read_hit > 0, "read hit happened");
    for (int b = 0; b < 3; b++) check(n_refill[b] > 0, $sformatf("refill of block size %0d happened", b));
    check(n_write_hit > 0, "write hit happened");
    check(n_write_miss > 0, "write miss happened");
    for (int a = 0; a < 3; a++)
      for (int b = 0; b < 3; b++)
        check(cfg_used[a][b] > 0, $sformatf("configuration %0d/%0d used", a, b));
    check(n_search_done > 0, "a search finished");
    check(n_retune > 0, "a retune happened");
    check(n_phase_kept > 0, "a phase was kept");
    check(n_static_phase > 0, "a static phase happened");
    check(n_mode_switch >= 2, "mode switches happened");
    check(n_update_cycles > 0, "controller update made busy");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : watchdog
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
