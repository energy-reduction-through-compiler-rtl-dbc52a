// fbb: function behaviour buffer, a table of info blocks that profile the
// functions the program spends its time in.
//
// Each of the ENTRIES info blocks holds a tag and eight counters: cycles,
// correct and mispredicted branches, data cache misses and hits,
// instruction cache misses and hits, and number of calls. The buffer is
// indexed with the low bits of the current function ID and the rest is
// compared with the tag (direct mapped: the indexing scheme is this design's
// choice). Every cycle the block of the current function is read, its
// cycles counter is incremented together with the counter of every event
// strobe that is high, and num_calls is incremented in the first cycle after
// a call (call_pulse). If the block belongs to another function, or is
// empty, it is taken over: the tag is written and counting starts from
// zero. All counters saturate.
//
// Hot detection: a function is hot when its cycles count reaches
// 2**HOT_BIT, that is a fraction 2**-HOT_SHIFT of the refresh period
// 2**REFRESH_BITS, found by watching bit HOT_BIT of the cycles counter. A
// sticky hot flag per block is then set and hot_pulse/hot_fid report the
// function for one cycle. clear (from the refresh timer) empties every block
// at the clock edge, dropping that cycle's update.
//
// A combinational read port (rd_idx) gives the runtime system one block.
module fbb
  import cdr_pkg::*;
#(
  parameter int unsigned ENTRIES      = 64,
  parameter int unsigned REFRESH_BITS = 20,
  parameter int unsigned HOT_SHIFT    = 3,
  localparam int unsigned IDX_W       = $clog2(ENTRIES),
  localparam int unsigned TAG_W       = FID_W - IDX_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  func_id_t         cur_fid,
  input  logic             call_pulse,
  input  prof_events_t     ev,
  input  logic             clear,
  // hot function report
  output logic             hot_pulse,
  output func_id_t         hot_fid,
  // read port
  input  logic [IDX_W-1:0] rd_idx,
  output logic             rd_valid,
  output logic             rd_hot,
  output logic [TAG_W-1:0] rd_tag,
  output info_cnt_t        rd_cnt,
  // update status, for observation
  output logic             replace
);

  localparam int unsigned HOT_BIT = REFRESH_BITS - HOT_SHIFT;

  logic [ENTRIES-1:0] valid, hot;
  logic [TAG_W-1:0]   tags [ENTRIES];
  info_cnt_t          cnts [ENTRIES];

  logic [IDX_W-1:0] idx;
  logic [TAG_W-1:0] tag;
  logic             hit;
  info_cnt_t        base, nxt;
  logic             hot_old, hot_new;

  always_comb begin
    idx     = cur_fid[IDX_W-1:0];
    tag     = cur_fid[FID_W-1:IDX_W];
    hit     = valid[idx] && (tags[idx] == tag);
    replace = !hit;
    base    = hit ? cnts[idx] : '0;
    hot_old = hit && hot[idx];

    nxt.cycles     = sat_inc(base.cycles,     1'b1);
    nxt.br_correct = sat_inc(base.br_correct, ev.br_correct);
    nxt.br_mispred = sat_inc(base.br_mispred, ev.br_mispred);
    nxt.dc_miss    = sat_inc(base.dc_miss,    ev.dc_miss);
    nxt.dc_hit     = sat_inc(base.dc_hit,     ev.dc_hit);
    nxt.ic_miss    = sat_inc(base.ic_miss,    ev.ic_miss);
    nxt.ic_hit     = sat_inc(base.ic_hit,     ev.ic_hit);
    nxt.num_calls  = sat_inc(base.num_calls,  call_pulse);

    hot_new   = hot_old || nxt.cycles[HOT_BIT];
    hot_pulse = !clear && hot_new && !hot_old;
    hot_fid   = cur_fid;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid <= '0;
      hot   <= '0;
    end else if (clear) begin
      valid <= '0;
      hot   <= '0;
    end else begin
      valid[idx] <= 1'b1;
      hot[idx]   <= hot_new;
    end
  end

  always_ff @(posedge clk) begin
    if (!clear) begin
      tags[idx] <= tag;
      cnts[idx] <= nxt;
    end
  end

  assign rd_valid = valid[rd_idx];
  assign rd_hot   = valid[rd_idx] && hot[rd_idx];
  assign rd_tag   = valid[rd_idx] ? tags[rd_idx] : '0;
  assign rd_cnt   = valid[rd_idx] ? cnts[rd_idx] : '0;

  initial begin
    assert (REFRESH_BITS <= CNT_W && HOT_SHIFT >= 1 && HOT_SHIFT <= REFRESH_BITS)
      else $error("fbb: need HOT_BIT inside the cycles counter");
  end

endmodule
