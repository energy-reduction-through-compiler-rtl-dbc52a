// cdr_top: hardware of compiler-directed resizing of the instruction window.
//
// Two cooperating parts:
//  * the hot function detector (profiler), which follows calls and returns,
//    keeps an info block of event counts per recently executed function and
//    reports functions that take a large share of a refresh period, for the
//    runtime system and dynamic compiler to read;
//  * the fetch throttle, which stops instruction fetch while the number of
//    instructions in the processor is at or above MAXCOUNT. MAXCOUNT is set
//    by maxcnt instructions that the compiler places in the prologue and
//    epilogue of hot functions (or of their callers); maxcnt_decode spots
//    them among the instructions being decoded.
// The processor itself (caches, decode, issue window, execution units,
// re-order buffer) is outside: its fetch, commit and squash counts, decode
// slots, call/return and profiling event strobes are inputs here, and
// fetch_gate goes back to its fetch stage. The FBB read port and the hot
// report are the runtime system's interface.
module cdr_top
  import cdr_pkg::*;
#(
  parameter int unsigned COUNT_W      = 8,
  parameter int unsigned FETCH_W      = 4,
  parameter int unsigned DECODE_W     = 4,
  parameter int unsigned COMMIT_W     = 4,
  parameter int unsigned FIS_DEPTH    = 32,
  parameter int unsigned FBB_ENTRIES  = 64,
  parameter int unsigned REFRESH_BITS = 20,
  parameter int unsigned HOT_SHIFT    = 3,
  localparam int unsigned IDX_W       = $clog2(FBB_ENTRIES),
  localparam int unsigned TAG_W       = FID_W - IDX_W
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // fetch throttle
  input  logic [$clog2(FETCH_W+1)-1:0]  fetch_n,
  input  logic [$clog2(COMMIT_W+1)-1:0] commit_n,
  input  logic [COUNT_W-1:0]            squash_n,
  input  logic                          dec_valid [DECODE_W],
  input  pisa_inst_t                    dec_inst  [DECODE_W],
  output logic                          fetch_gate,
  output logic [COUNT_W-1:0]            inst_count,
  output logic [COUNT_W-1:0]            maxcount,
  // profiler
  input  logic                          call,
  input  pc_t                           call_target,
  input  logic                          ret,
  input  prof_events_t                  ev,
  output func_id_t                      cur_fid,
  output logic [$clog2(FIS_DEPTH+1)-1:0] stack_depth,
  output logic                          stack_overflow,
  output logic                          refresh,
  output logic                          hot_pulse,
  output func_id_t                      hot_fid,
  output logic                          fbb_replace,
  input  logic [IDX_W-1:0]              rd_idx,
  output logic                          rd_valid,
  output logic                          rd_hot,
  output logic [TAG_W-1:0]              rd_tag,
  output info_cnt_t                     rd_cnt
);

  logic        maxcnt_we;
  logic [15:0] maxcnt_val;

  maxcnt_decode #(.DECODE_W(DECODE_W)) u_dec (
    .dec_valid (dec_valid),
    .dec_inst  (dec_inst),
    .maxcnt_we (maxcnt_we),
    .maxcnt_val(maxcnt_val)
  );

  fetch_throttle #(
    .COUNT_W (COUNT_W),
    .FETCH_W (FETCH_W),
    .COMMIT_W(COMMIT_W)
  ) u_throttle (
    .clk       (clk),
    .rst_n     (rst_n),
    .maxcnt_we (maxcnt_we),
    .maxcnt_val(maxcnt_val),
    .fetch_n   (fetch_n),
    .commit_n  (commit_n),
    .squash_n  (squash_n),
    .fetch_gate(fetch_gate),
    .count     (inst_count),
    .maxcount  (maxcount)
  );

  hot_function_detector #(
    .FIS_DEPTH   (FIS_DEPTH),
    .FBB_ENTRIES (FBB_ENTRIES),
    .REFRESH_BITS(REFRESH_BITS),
    .HOT_SHIFT   (HOT_SHIFT)
  ) u_hfd (
    .clk           (clk),
    .rst_n         (rst_n),
    .call          (call),
    .call_target   (call_target),
    .ret           (ret),
    .ev            (ev),
    .cur_fid       (cur_fid),
    .stack_depth   (stack_depth),
    .stack_overflow(stack_overflow),
    .refresh       (refresh),
    .hot_pulse     (hot_pulse),
    .hot_fid       (hot_fid),
    .fbb_replace   (fbb_replace),
    .rd_idx        (rd_idx),
    .rd_valid      (rd_valid),
    .rd_hot        (rd_hot),
    .rd_tag        (rd_tag),
    .rd_cnt        (rd_cnt)
  );

endmodule
