// hot_function_detector: the profiler that finds hot functions and records
// their behaviour.
//
// It holds the current function ID register and ties together the function
// ID stack, the function behaviour buffer (fbb) and the refresh timer.
// On a call (call = 1, call_target = PC of the first instruction of the
// callee) the current ID is pushed and the callee's ID is loaded; the
// callee's num_calls is counted in the following cycle. On a return the
// stack is popped into the current ID; a return with an empty stack keeps
// the current ID. Every cycle the fbb counts one cycle, plus the strobed
// events, for the current function. When the refresh timer expires the fbb
// is emptied. Calls and returns are expected from the commit stage, one per
// cycle at most; call and ret together are treated as a call.
//
// The structure (stack, current ID, buffer of info blocks, refresh timer,
// hot bit) follows the profiler's description; sizes, the reset ID and the
// stack corner cases are this design's choices.
module hot_function_detector
  import cdr_pkg::*;
#(
  parameter int unsigned FIS_DEPTH    = 32,
  parameter int unsigned FBB_ENTRIES  = 64,
  parameter int unsigned REFRESH_BITS = 20,
  parameter int unsigned HOT_SHIFT    = 3,
  parameter func_id_t    RESET_FID    = '0,
  localparam int unsigned IDX_W       = $clog2(FBB_ENTRIES),
  localparam int unsigned TAG_W       = FID_W - IDX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             call,
  input  pc_t              call_target,
  input  logic             ret,
  input  prof_events_t     ev,
  output func_id_t         cur_fid,
  output logic [$clog2(FIS_DEPTH+1)-1:0] stack_depth,
  output logic             stack_overflow,
  output logic             refresh,
  output logic             hot_pulse,
  output func_id_t         hot_fid,
  output logic             fbb_replace,
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_valid,
  output logic             rd_hot,
  output logic [TAG_W-1:0] rd_tag,
  output info_cnt_t        rd_cnt
);

  logic     call_pulse;
  logic     do_pop;
  func_id_t stack_top;
  logic     stack_top_valid;

  assign do_pop = ret && !call;

  func_id_stack #(
    .DEPTH(FIS_DEPTH),
    .W    (FID_W)
  ) u_fis (
    .clk      (clk),
    .rst_n    (rst_n),
    .push     (call),
    .push_id  (cur_fid),
    .pop      (do_pop),
    .top      (stack_top),
    .top_valid(stack_top_valid),
    .depth    (stack_depth),
    .overflow (stack_overflow)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_fid    <= RESET_FID;
      call_pulse <= 1'b0;
    end else begin
      call_pulse <= call;
      if (call)                           cur_fid <= pc_to_fid(call_target);
      else if (do_pop && stack_top_valid) cur_fid <= stack_top;
    end
  end

  refresh_timer #(.BITS(REFRESH_BITS)) u_timer (
    .clk   (clk),
    .rst_n (rst_n),
    .value (),
    .expire(refresh)
  );

  fbb #(
    .ENTRIES     (FBB_ENTRIES),
    .REFRESH_BITS(REFRESH_BITS),
    .HOT_SHIFT   (HOT_SHIFT)
  ) u_fbb (
    .clk       (clk),
    .rst_n     (rst_n),
    .cur_fid   (cur_fid),
    .call_pulse(call_pulse),
    .ev        (ev),
    .clear     (refresh),
    .hot_pulse (hot_pulse),
    .hot_fid   (hot_fid),
    .rd_idx    (rd_idx),
    .rd_valid  (rd_valid),
    .rd_hot    (rd_hot),
    .rd_tag    (rd_tag),
    .rd_cnt    (rd_cnt),
    .replace   (fbb_replace)
  );

endmodule
