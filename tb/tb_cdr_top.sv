// tb_cdr_top: end-to-end run of the whole design at its default sizes
// (64-entry buffer, 32-entry stack, 2**20-cycle refresh period, 8-bit
// instruction count), a little over one refresh period long.
//
// A toy core fetches up to four instructions per cycle while fetch is not
// gated and it holds fewer than 200, commits up to four, and now and then
// squashes. A scripted program runs on it:
//   * random calls and returns among eight functions, two pairs of which
//     share a buffer index;
//   * a long call to one function whose prologue sets MAXCOUNT to 24 and
//     whose epilogue restores 255: it becomes hot during that one call;
//   * a loop in the caller, which sets MAXCOUNT to 40 once, calling a short
//     function many times: it becomes hot over many calls;
//   * a 40-deep recursion that overflows the stack, then returns past the
//     bottom of the stack.
// Every cycle the gate, count, MAXCOUNT, current function, stack depth,
// refresh and hot reports are compared with reference models, and every
// 8192 cycles the whole buffer is read out and compared. Each mechanism must
// occur at least once.
module tb_cdr_top;
  import cdr_pkg::*;
  import cdr_model_pkg::*;
  localparam int unsigned ENTRIES = 64, IDX_W = 6, TAG_W = FID_W - IDX_W;
  localparam int unsigned PERIOD = 1 << 20, HOT_SHIFT = 3, DEPTH = 32, CAP = 200;
  localparam int unsigned RUN = 1_150_000;
  localparam logic [7:0] OP_ADD = 8'h43;

  logic clk = 0, rst_n = 0;
  logic [2:0] fetch_n, commit_n;
  logic [7:0] squash_n, inst_count, maxcount;
  logic dec_valid [4];
  pisa_inst_t dec_inst [4];
  logic fetch_gate, call, ret, stack_overflow, refresh, hot_pulse, fbb_replace, rd_valid, rd_hot;
  pc_t call_target;
  prof_events_t ev;
  func_id_t cur_fid, hot_fid;
  logic [5:0] stack_depth;
  logic [IDX_W-1:0] rd_idx;
  logic [TAG_W-1:0] rd_tag;
  info_cnt_t rd_cnt;

  int checks = 0, failures = 0;
  int n_gated = 0, n_write = 0, n_call = 0, n_ret = 0, n_over = 0, n_empty = 0;
  int n_hot = 0, n_refresh = 0, n_squash = 0, n_hot1 = 0, n_hot2 = 0;
  fbb_model   fm;
  stack_model sm;
  longint unsigned m_cur, v;
  bit m_cp;
  int m_cnt, m_max;
  pc_t funcs [8];
  pc_t F_HOT, F_SMALL, F_REC;

  cdr_top dut (.*);
  always #100 clk = ~clk;   // slow clock: a full read-out fits in half a period

  initial begin
    repeat (RUN + 1000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_all();
    int unsigned got[8];
    for (int i = 0; i < ENTRIES; i++) begin
      rd_idx = IDX_W'(i);
      #1;
      got = '{rd_cnt.cycles, rd_cnt.br_correct, rd_cnt.br_mispred, rd_cnt.dc_miss,
              rd_cnt.dc_hit, rd_cnt.ic_miss, rd_cnt.ic_hit, rd_cnt.num_calls};
      if (rd_valid !== fm.valid[i] || (fm.valid[i] && (rd_hot !== fm.hot[i] ||
          rd_tag !== TAG_W'(fm.fid_of[i] >> IDX_W)))) begin
        failures++; $display("entry %0d valid/tag/hot mismatch", i);
      end else if (fm.valid[i])
        for (int k = 0; k < 8; k++)
          if (got[k] != fm.cnt[i][k]) begin
            failures++; $display("entry %0d counter %0d = %0d, expected %0d", i, k, got[k], fm.cnt[i][k]);
          end
      checks++;
    end
  endtask

  // Decode group: random ordinary instructions, with one maxcnt if asked.
  task automatic fill_decode(int maxcnt_value);
    int slot;
    slot = $urandom_range(0, 3);
    for (int s = 0; s < 4; s++) begin
      dec_valid[s]   = ($urandom_range(0, 3) != 0);
      dec_inst[s].a  = {16'($urandom), 8'h00, OP_ADD};
      dec_inst[s].b  = $urandom;
    end
    if (maxcnt_value >= 0) begin
      dec_valid[slot]     = 1'b1;
      dec_inst[slot].a    = {16'h0000, 8'h00, 8'hF0};
      dec_inst[slot].b    = {16'h0000, 16'(maxcnt_value)};
    end
  endtask

  initial begin
    bit e[6];
    bit exp_hot, exp_ref, exp_over, exp_gate;
    int sel, mx;
    fm = new(ENTRIES, 20, HOT_SHIFT);
    sm = new(DEPTH);
    m_cur = 0; m_cp = 0; m_cnt = 0; m_max = 255;
    // 0x..100 and 0x..300 share index 32; 0x..208 and 0x..a08 share index 1
    funcs = '{32'h0040_0100, 32'h0040_0208, 32'h0041_0300, 32'h0040_0a08,
              32'h0040_0c40, 32'h0040_1050, 32'h0040_2060, 32'h0040_3078};
    F_HOT = 32'h0040_8000; F_SMALL = 32'h0040_9008; F_REC = 32'h0040_a010;
    fetch_n = 0; commit_n = 0; squash_n = 0; call = 0; ret = 0; call_target = '0;
    ev = '0; rd_idx = '0;
    fill_decode(-1);
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;

    for (int c = 0; c < RUN; c++) begin
      exp_gate = (m_cnt >= m_max);
      if (fetch_gate !== exp_gate || inst_count !== 8'(m_cnt) || maxcount !== 8'(m_max) ||
          cur_fid !== func_id_t'(m_cur) || stack_depth !== 6'(sm.q.size())) begin
        failures++;
        $display("cycle %0d: gate %0b cnt %0d max %0d cur %h depth %0d; expected %0b %0d %0d %h %0d",
                 c, fetch_gate, inst_count, maxcount, cur_fid, stack_depth,
                 exp_gate, m_cnt, m_max, m_cur, sm.q.size());
      end
      checks++;
      n_gated += exp_gate;

      // ---- program script: calls, returns, maxcnt placement ----
      call = 0; ret = 0; mx = -1;
      sel  = $urandom_range(0, 999);
      call_target = funcs[$urandom_range(0, 7)];
      if (c < 20_000 || (c >= 700_100 && c < RUN)) begin
        call = (sel < 20); ret = (sel >= 20 && sel < 40);
        if (sel >= 990) mx = $urandom_range(0, 300);
      end else if (c == 20_000) begin
        call = 1; call_target = F_HOT;
      end else if (c == 20_001) begin
        mx = 24;                                  // prologue of the hot callee
      end else if (c == 170_000) begin
        mx = 255;                                 // epilogue
      end else if (c == 170_001) begin
        ret = 1;
      end else if (c == 170_002) begin
        mx = 40;                                  // placed once in the caller
      end else if (c > 170_002 && c < 700_000) begin
        if (c % 50 == 0) begin call = 1; call_target = F_SMALL; end
        if (c % 50 == 40) ret = 1;
      end else if (c >= 700_000 && c < 700_040) begin
        call = 1; call_target = F_REC;            // deep recursion
      end else if (c >= 700_040 && c < 700_100) begin
        ret = 1;                                  // unwinds past the stack bottom
      end
      fill_decode(mx);

      // ---- toy core ----
      fetch_n  = exp_gate ? 3'd0 : 3'($urandom_range(0, 4));
      if (m_cnt + fetch_n > CAP) fetch_n = 0;
      commit_n = 3'($urandom_range(0, (m_cnt < 4) ? m_cnt : 4));
      squash_n = 0;
      if ($urandom_range(0, 199) == 0) begin
        squash_n = 8'($urandom_range(0, m_cnt - commit_n));
        n_squash++;
      end
      ev = prof_events_t'($urandom);
      e  = '{ev.br_correct, ev.br_mispred, ev.dc_miss, ev.dc_hit, ev.ic_miss, ev.ic_hit};

      exp_ref  = (c % PERIOD == PERIOD - 1);
      exp_over = call && sm.q.size() == DEPTH;
      #1;
      exp_hot = fm.step(m_cur, m_cp, e, exp_ref);
      if (hot_pulse !== exp_hot || (exp_hot && hot_fid !== func_id_t'(m_cur)) ||
          refresh !== exp_ref || stack_overflow !== exp_over) begin
        failures++; $display("cycle %0d: hot %0b refresh %0b overflow %0b", c, hot_pulse, refresh, stack_overflow);
      end
      checks++;
      if (exp_hot) begin
        $display("cycle %0d: function %h reported hot", c, m_cur);
        if (m_cur == longint'(F_HOT >> 3))   n_hot1++;
        if (m_cur == longint'(F_SMALL >> 3)) n_hot2++;
      end
      n_hot += exp_hot; n_refresh += exp_ref;

      // ---- model update ----
      m_cnt = m_cnt + fetch_n - commit_n - squash_n;
      if (mx >= 0) begin
        n_write++;
        m_max = (mx == 0) ? 1 : (mx > 255) ? 255 : mx;
      end
      m_cp = call;
      if (call) begin
        n_over += sm.push(m_cur);
        m_cur = longint'(call_target >> 3);
        n_call++;
      end else if (ret) begin
        n_ret++;
        if (sm.pop(v)) m_cur = v; else n_empty++;
      end
      @(negedge clk);
      if (c % 8192 == 0 || exp_ref) check_all();
    end

    $display("gated cycles %0d, MAXCOUNT writes %0d, squashes %0d", n_gated, n_write, n_squash);
    $display("calls %0d, returns %0d, stack overflows %0d, returns on empty stack %0d",
             n_call, n_ret, n_over, n_empty);
    $display("buffer evictions %0d, refreshes %0d, hot reports %0d (long call %0d, many calls %0d)",
             fm.evictions, n_refresh, n_hot, n_hot1, n_hot2);
    if (n_gated == 0)      begin failures++; $display("fetch gating never happened"); end
    if (n_write == 0)      begin failures++; $display("no maxcnt write"); end
    if (n_squash == 0)     begin failures++; $display("no squash"); end
    if (n_over == 0)       begin failures++; $display("no stack overflow"); end
    if (n_empty == 0)      begin failures++; $display("no return on empty stack"); end
    if (fm.evictions == 0) begin failures++; $display("no buffer eviction"); end
    if (n_refresh == 0)    begin failures++; $display("no refresh"); end
    if (n_hot1 == 0)       begin failures++; $display("long call never hot"); end
    if (n_hot2 == 0)       begin failures++; $display("repeatedly called function never hot"); end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
