// tb_hot_function_detector: random calls and returns (deep enough to
// overflow the function ID stack, and returns past its bottom) with random
// profiling events. The current function ID, stack depth, refresh and hot
// reports are checked every cycle, and the whole buffer regularly, against
// the stack and buffer reference models.
module tb_hot_function_detector;
  import cdr_pkg::*;
  import cdr_model_pkg::*;
  localparam int unsigned FIS_DEPTH = 4, ENTRIES = 8, RB = 9, HS = 2;  // hot at 128 cycles
  localparam int unsigned IDX_W = 3, TAG_W = FID_W - IDX_W;
  localparam int unsigned PERIOD = 1 << RB;
  logic clk = 0, rst_n = 0;
  logic call, ret, stack_overflow, refresh, hot_pulse, fbb_replace, rd_valid, rd_hot;
  pc_t call_target;
  prof_events_t ev;
  func_id_t cur_fid, hot_fid;
  logic [2:0] stack_depth;
  logic [IDX_W-1:0] rd_idx;
  logic [TAG_W-1:0] rd_tag;
  info_cnt_t rd_cnt;
  int checks = 0, failures = 0;
  int n_call = 0, n_ret = 0, n_over = 0, n_empty = 0, n_hot = 0, n_refresh = 0;
  fbb_model   fm;
  stack_model sm;
  longint unsigned m_cur, v;
  bit m_cp;
  pc_t funcs [6];

  hot_function_detector #(.FIS_DEPTH(FIS_DEPTH), .FBB_ENTRIES(ENTRIES),
                          .REFRESH_BITS(RB), .HOT_SHIFT(HS)) dut (.*);
  always #50 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
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

  initial begin
    bit e[6];
    bit exp_hot, exp_ref, exp_over;
    int sel, mode;
    fm = new(ENTRIES, RB, HS);
    sm = new(FIS_DEPTH);
    m_cur = 0; m_cp = 0;
    funcs = '{32'h0040_0100, 32'h0040_0208, 32'h0040_0310, 32'h0040_0140, 32'h0040_0a18, 32'h0040_0520};
    call = 0; ret = 0; call_target = '0; ev = '0; rd_idx = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 6 * PERIOD; c++) begin
      if (cur_fid !== func_id_t'(m_cur) || stack_depth !== 3'(sm.q.size())) begin
        failures++; $display("cycle %0d: cur %h depth %0d, expected %h %0d", c, cur_fid, stack_depth, m_cur, sm.q.size());
      end
      checks++;
      // calling behaviour changes every 300 cycles: quiet, normal, deep, unwinding
      mode = (c / 300) % 4;
      sel  = $urandom_range(0, 99);
      call = 0; ret = 0;
      case (mode)
        0: ;                                               // long stay in one function
        1: begin call = (sel < 5); ret = (sel >= 5 && sel < 10); end
        2: call = (sel < 8);
        default: ret = (sel < 8);
      endcase
      if (call && $urandom_range(0, 3) == 0) ret = 1;       // both at once: a call
      call_target = funcs[$urandom_range(0, 5)];
      ev = prof_events_t'($urandom);
      e  = '{ev.br_correct, ev.br_mispred, ev.dc_miss, ev.dc_hit, ev.ic_miss, ev.ic_hit};
      exp_ref  = (c % PERIOD == PERIOD - 1);
      exp_over = call && sm.q.size() == FIS_DEPTH;
      #1;
      exp_hot = fm.step(m_cur, m_cp, e, exp_ref);
      if (hot_pulse !== exp_hot || (exp_hot && hot_fid !== func_id_t'(m_cur)) ||
          refresh !== exp_ref || stack_overflow !== exp_over) begin
        failures++; $display("cycle %0d: hot %0b refresh %0b overflow %0b", c, hot_pulse, refresh, stack_overflow);
      end
      checks++;
      n_hot += exp_hot; n_refresh += exp_ref;
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
      if (c % 64 == 0 || exp_ref) check_all();
    end
    $display("calls %0d returns %0d overflows %0d empty returns %0d hot %0d refreshes %0d replacements %0d",
             n_call, n_ret, n_over, n_empty, n_hot, n_refresh, fm.replaces);
    if (n_over == 0 || n_empty == 0 || n_hot == 0 || n_refresh == 0) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
