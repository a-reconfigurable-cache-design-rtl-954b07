// dynamic_red_cache: the run-time reconfiguration controller ("Dynamic Red Cache").
//
// Sits between the processor and memory on one side and the Red Cache on the
// other, forwarding all traffic, and chooses the Red Cache's configuration
// from its miss counts. Time is measured in processor accesses.
//
// Dynamic mode (setCacheConfiguration = 01) runs a two-stage search:
//   stage 1  direct-mapped with 16-, 32- and 64-word blocks, CDI accesses
//            each; the block size with the fewest misses wins;
//   stage 2  that block size with 2-way and then 4-way, CDI accesses each;
//            the associativity with the fewest misses (direct-mapped counted
//            from stage 1) wins. Ties keep the earlier, smaller setting.
// The winner then runs in phases of PHASE_LEN accesses. At the end of each
// phase the phase's hits and misses and its configuration are presented
// with a one-cycle hitMissValuesReady pulse; if the phase's miss rate is
// above MISS_THRESH_PCT percent the search starts again. The search also
// runs at the start of execution.
// Static mode (any other setCacheConfiguration value) uses
// staticAssociativeMode / staticBlockSize for every access and still
// reports phases of PHASE_LEN accesses. The mode is sampled at the first
// access after reset and then at each interval end.
//
// At every interval end (all of the interval's accesses done, Red Cache
// idle) the controller spends one cycle updating: busy is high, the Red
// Cache counters are read and cleared and the next configuration applied.
// Outside that cycle busy is the Red Cache's busy.
//
// Follows the design: the two stages, their order, the 128-access interval,
// the phase, the miss-rate threshold, static/dynamic mode and the
// interface. This design's own choices: the phase length and the threshold
// value (the design gives neither), the tie rule, counting intervals in
// processor accesses, the one-cycle update, Hits/Misses reporting the
// just-ended phase, and static parameters as two level inputs.
module dynamic_red_cache
  import rabed_pkg::*;
#(
  parameter int unsigned CDI             = 128,
  parameter int unsigned PHASE_LEN       = 1024,
  parameter int unsigned MISS_THRESH_PCT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  // processor side
  input  logic        procRead,
  input  logic        procWrite,
  input  addr_t       procAddr,
  input  data_t       dataFromProc,
  output logic        dataReadyForProc,
  output data_t       dataToProc,
  output logic        busy,
  // memory side
  output logic        memRead,
  output logic        memWrite,
  output addr_t       addrToMem,
  output data_t       dataToMem,
  input  logic        dataReadyFromMem,
  input  data_t       dataFromMem,
  // phase reporting and configuration
  output logic [CNT_W-1:0] Hits,
  output logic [CNT_W-1:0] Misses,
  output logic        hitMissValuesReady,
  output logic [1:0]  getAssociativeMode,
  output logic [1:0]  getBlockSize,
  input  logic [1:0]  setCacheConfiguration,
  input  logic [1:0]  staticAssociativeMode,
  input  logic [1:0]  staticBlockSize,
  // Red Cache side
  output logic        rc_procRead,
  output logic        rc_procWrite,
  output addr_t       rc_procAddr,
  output data_t       rc_dataFromProc,
  input  logic        rc_dataReadyForProc,
  input  data_t       rc_dataToProc,
  input  logic        rc_busy,
  output logic [1:0]  rc_setAssociativeMode,
  output logic [1:0]  rc_setBlockSize,
  input  logic        rc_memRead,
  input  logic        rc_memWrite,
  input  addr_t       rc_addrToMem,
  input  data_t       rc_dataToMem,
  output logic        rc_dataReadyFromMem,
  output data_t       rc_dataFromMem,
  input  logic [CNT_W-1:0] rc_Hits,
  input  logic [CNT_W-1:0] rc_Misses,
  output logic        rc_resetHitMissCounters
);

  typedef enum logic [2:0] {
    STEP_S1_16,     // stage 1: direct-mapped, 16 words
    STEP_S1_32,     // stage 1: direct-mapped, 32 words
    STEP_S1_64,     // stage 1: direct-mapped, 64 words
    STEP_S2_2W,     // stage 2: 2-way, best block size
    STEP_S2_4W,     // stage 2: 4-way, best block size
    STEP_PHASE      // running the chosen configuration
  } step_e;

  localparam int unsigned LEN_W = $clog2(PHASE_LEN > CDI ? PHASE_LEN + 1 : CDI + 1);

  step_e              step_q;
  logic               boot_q;        // no access seen since reset
  logic               dyn_q;         // mode of the current interval
  assoc_e             dyn_assoc_q;   // configuration applied in dynamic mode
  bsize_e             dyn_bsize_q;
  assoc_e             best_assoc_q;
  bsize_e             best_bsize_q;
  logic [CNT_W-1:0]   best_miss_q;
  logic [LEN_W-1:0]   acc_cnt_q;

  logic               dyn_now, dyn_eff;
  logic [LEN_W-1:0]   cur_len;
  logic               interval_done;
  logic               accept;
  logic [1:0]         cfg_assoc, cfg_bsize;
  logic               over_thresh;

  assign dyn_now       = (setCacheConfiguration == 2'b01);
  assign dyn_eff       = boot_q ? dyn_now : dyn_q;
  assign cur_len       = (dyn_eff && step_q != STEP_PHASE) ? LEN_W'(CDI) : LEN_W'(PHASE_LEN);
  assign interval_done = (acc_cnt_q == cur_len) && !rc_busy;
  assign accept        = (procRead || procWrite) && !busy;
  assign cfg_assoc     = dyn_eff ? dyn_assoc_q : staticAssociativeMode;
  assign cfg_bsize     = dyn_eff ? dyn_bsize_q : staticBlockSize;
  assign over_thresh   = (64'(rc_Misses) * 100) > (64'(MISS_THRESH_PCT) * 64'(PHASE_LEN));

  // ---------------------------------------------------------------- forwarding
  assign busy                    = rc_busy || interval_done;
  assign rc_procRead             = procRead  && !interval_done;
  assign rc_procWrite            = procWrite && !interval_done;
  assign rc_procAddr             = procAddr;
  assign rc_dataFromProc         = dataFromProc;
  assign dataReadyForProc        = rc_dataReadyForProc;
  assign dataToProc              = rc_dataToProc;
  assign rc_setAssociativeMode   = cfg_assoc;
  assign rc_setBlockSize         = cfg_bsize;
  assign memRead                 = rc_memRead;
  assign memWrite                = rc_memWrite;
  assign addrToMem               = rc_addrToMem;
  assign dataToMem               = rc_dataToMem;
  assign rc_dataReadyFromMem     = dataReadyFromMem;
  assign rc_dataFromMem          = dataFromMem;
  assign rc_resetHitMissCounters = interval_done;

  // ---------------------------------------------------------------- tuning
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      step_q             <= STEP_S1_16;
      boot_q             <= 1'b1;
      dyn_q              <= 1'b0;
      dyn_assoc_q        <= ASSOC_DM;
      dyn_bsize_q        <= BS_16;
      best_assoc_q       <= ASSOC_DM;
      best_bsize_q       <= BS_16;
      best_miss_q        <= '0;
      acc_cnt_q          <= '0;
      Hits               <= '0;
      Misses             <= '0;
      hitMissValuesReady <= 1'b0;
      getAssociativeMode <= 2'b00;
      getBlockSize       <= 2'b00;
    end else begin
      hitMissValuesReady <= 1'b0;
      if (accept) begin
        acc_cnt_q <= acc_cnt_q + 1'b1;
        if (boot_q) begin
          boot_q <= 1'b0;
          dyn_q  <= dyn_now;
        end
      end

      if (interval_done) begin
        acc_cnt_q <= '0;
        dyn_q     <= dyn_now;

        // report the end of a phase (static intervals are phases too)
        if (!dyn_eff || step_q == STEP_PHASE) begin
          Hits               <= rc_Hits;
          Misses             <= rc_Misses;
          hitMissValuesReady <= 1'b1;
          getAssociativeMode <= cfg_assoc;
          getBlockSize       <= cfg_bsize;
        end

        if (!dyn_now) begin
          // static: prepare a fresh search for a later switch to dynamic
          step_q      <= STEP_S1_16;
          dyn_assoc_q <= ASSOC_DM;
          dyn_bsize_q <= BS_16;
        end else if (!dyn_eff) begin
          // static -> dynamic: start the search
          step_q      <= STEP_S1_16;
          dyn_assoc_q <= ASSOC_DM;
          dyn_bsize_q <= BS_16;
        end else begin
          case (step_q)
            STEP_S1_16: begin
              best_miss_q  <= rc_Misses;
              best_bsize_q <= BS_16;
              dyn_bsize_q  <= BS_32;
              step_q       <= STEP_S1_32;
            end
            STEP_S1_32: begin
              if (rc_Misses < best_miss_q) begin
                best_miss_q  <= rc_Misses;
                best_bsize_q <= BS_32;
              end
              dyn_bsize_q <= BS_64;
              step_q      <= STEP_S1_64;
            end
            STEP_S1_64: begin
              best_assoc_q <= ASSOC_DM;
              dyn_assoc_q  <= ASSOC_2W;
              if (rc_Misses < best_miss_q) begin
                best_miss_q  <= rc_Misses;
                best_bsize_q <= BS_64;
                dyn_bsize_q  <= BS_64;
              end else begin
                dyn_bsize_q  <= best_bsize_q;
              end
              step_q <= STEP_S2_2W;
            end
            STEP_S2_2W: begin
              if (rc_Misses < best_miss_q) begin
                best_miss_q  <= rc_Misses;
                best_assoc_q <= ASSOC_2W;
              end
              dyn_assoc_q <= ASSOC_4W;
              step_q      <= STEP_S2_4W;
            end
            STEP_S2_4W: begin
              if (rc_Misses < best_miss_q) begin
                best_miss_q  <= rc_Misses;
                best_assoc_q <= ASSOC_4W;
                dyn_assoc_q  <= ASSOC_4W;
              end else begin
                dyn_assoc_q  <= best_assoc_q;
              end
              step_q <= STEP_PHASE;
            end
            default: begin  // STEP_PHASE
              if (over_thresh) begin
                step_q      <= STEP_S1_16;
                dyn_assoc_q <= ASSOC_DM;
                dyn_bsize_q <= BS_16;
              end
            end
          endcase
        end
      end
    end
  end

  // ---------------------------------------------------------------- checks
  a_count_bound: assert property (@(posedge clk) disable iff (!rst_n)
    acc_cnt_q <= cur_len);
  a_no_accept_on_update: assert property (@(posedge clk) disable iff (!rst_n)
    interval_done |-> !(rc_procRead || rc_procWrite));

endmodule
