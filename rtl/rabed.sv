// rabed: top level of the reconfigurable-associativity, reconfigurable-
// block-size embedded dynamic data cache.
//
// The processor and the memory connect to the Dynamic Red Cache, which
// forwards their traffic to the Red Cache and reconfigures it between
// direct-mapped/2-way/4-way and 16/32/64-word blocks from its measured
// miss rate (or holds a static configuration). The Red Cache is a 64 KB
// write-through LRU cache with 24-bit word addresses and 32-bit words.
// See dynamic_red_cache and red_cache for the search, the phases, the
// handshakes and the timing; this module only wires the two together, as
// the design's block diagram does. Reset is active low and asynchronous.
module rabed
  import rabed_pkg::*;
#(
  parameter int unsigned CDI             = 128,
  parameter int unsigned PHASE_LEN       = 1024,
  parameter int unsigned MISS_THRESH_PCT = 10
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        procRead,
  input  logic        procWrite,
  input  addr_t       procAddr,
  input  data_t       dataFromProc,
  output logic        dataReadyForProc,
  output data_t       dataToProc,
  output logic        busy,
  output logic        memRead,
  output logic        memWrite,
  output addr_t       addrToMem,
  output data_t       dataToMem,
  input  logic        dataReadyFromMem,
  input  data_t       dataFromMem,
  output logic [CNT_W-1:0] Hits,
  output logic [CNT_W-1:0] Misses,
  output logic        hitMissValuesReady,
  output logic [1:0]  getAssociativeMode,
  output logic [1:0]  getBlockSize,
  input  logic [1:0]  setCacheConfiguration,
  input  logic [1:0]  staticAssociativeMode,
  input  logic [1:0]  staticBlockSize
);

  logic             rc_procRead, rc_procWrite, rc_dataReadyForProc, rc_busy;
  addr_t            rc_procAddr, rc_addrToMem;
  data_t            rc_dataFromProc, rc_dataToProc, rc_dataToMem, rc_dataFromMem;
  logic [1:0]       rc_setAssociativeMode, rc_setBlockSize;
  logic             rc_memRead, rc_memWrite, rc_dataReadyFromMem;
  logic [CNT_W-1:0] rc_Hits, rc_Misses;
  logic             rc_resetHitMissCounters;

  dynamic_red_cache #(
    .CDI             (CDI),
    .PHASE_LEN       (PHASE_LEN),
    .MISS_THRESH_PCT (MISS_THRESH_PCT)
  ) u_dyn (
    .clk, .rst_n,
    .procRead, .procWrite, .procAddr, .dataFromProc,
    .dataReadyForProc, .dataToProc, .busy,
    .memRead, .memWrite, .addrToMem, .dataToMem,
    .dataReadyFromMem, .dataFromMem,
    .Hits, .Misses, .hitMissValuesReady,
    .getAssociativeMode, .getBlockSize,
    .setCacheConfiguration, .staticAssociativeMode, .staticBlockSize,
    .rc_procRead, .rc_procWrite, .rc_procAddr, .rc_dataFromProc,
    .rc_dataReadyForProc, .rc_dataToProc, .rc_busy,
    .rc_setAssociativeMode, .rc_setBlockSize,
    .rc_memRead, .rc_memWrite, .rc_addrToMem, .rc_dataToMem,
    .rc_dataReadyFromMem, .rc_dataFromMem,
    .rc_Hits, .rc_Misses, .rc_resetHitMissCounters
  );

  red_cache u_red (
    .clk                  (clk),
    .rst_n                (rst_n),
    .procRead             (rc_procRead),
    .procWrite            (rc_procWrite),
    .procAddr             (rc_procAddr),
    .dataFromProc         (rc_dataFromProc),
    .dataReadyForProc     (rc_dataReadyForProc),
    .dataToProc           (rc_dataToProc),
    .busy                 (rc_busy),
    .setAssociativeMode   (rc_setAssociativeMode),
    .setBlockSize         (rc_setBlockSize),
    .memRead              (rc_memRead),
    .memWrite             (rc_memWrite),
    .addrToMem            (rc_addrToMem),
    .dataToMem            (rc_dataToMem),
    .dataReadyFromMem     (rc_dataReadyFromMem),
    .dataFromMem          (rc_dataFromMem),
    .Hits                 (rc_Hits),
    .Misses               (rc_Misses),
    .resetHitMissCounters (rc_resetHitMissCounters)
  );

endmodule
