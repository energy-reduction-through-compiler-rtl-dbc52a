// tb_fbb: drives the function behaviour buffer with a random current
// function (a small set of IDs, some sharing an index) and random event
// strobes, clears it periodically, and compares every info block, the hot
// flags and the hot reports with the reference model.
module tb_fbb;
  import cdr_pkg::*;
  import cdr_model_pkg::*;
  localparam int unsigned ENTRIES = 8, RB = 8, HS = 2;   // hot at 64 cycles
  localparam int unsigned IDX_W = 3, TAG_W = FID_W - IDX_W;
  logic clk = 0, rst_n = 0;
  func_id_t cur_fid, hot_fid;
  logic call_pulse, clear, hot_pulse, rd_valid, rd_hot, replace;
  prof_events_t ev;
  logic [IDX_W-1:0] rd_idx;
  logic [TAG_W-1:0] rd_tag;
  info_cnt_t rd_cnt;
  int checks = 0, failures = 0, n_hot = 0, n_clear = 0;
  fbb_model m;
  func_id_t ids [6];

  fbb #(.ENTRIES(ENTRIES), .REFRESH_BITS(RB), .HOT_SHIFT(HS)) dut (.*);
  always #50 clk = ~clk;   // slow clock: a full read-out fits in half a period

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check_all();
    int unsigned got[8];
    for (int i = 0; i < ENTRIES; i++) begin
      rd_idx = IDX_W'(i);
      #1;
      got = '{rd_cnt.cycles, rd_cnt.br_correct, rd_cnt.br_mispred, rd_cnt.dc_miss,
              rd_cnt.dc_hit, rd_cnt.ic_miss, rd_cnt.ic_hit, rd_cnt.num_calls};
      if (rd_valid !== m.valid[i]) begin failures++; $display("entry %0d valid %0b", i, rd_valid); end
      else if (m.valid[i]) begin
        if (rd_tag !== TAG_W'(m.fid_of[i] >> IDX_W) || rd_hot !== m.hot[i]) begin
          failures++; $display("entry %0d tag/hot mismatch", i);
        end
        for (int k = 0; k < 8; k++)
          if (got[k] != m.cnt[i][k]) begin
            failures++; $display("entry %0d counter %0d = %0d, expected %0d", i, k, got[k], m.cnt[i][k]);
          end
      end
      checks++;
    end
  endtask

  initial begin
    bit e[6];
    bit exp_hot;
    m = new(ENTRIES, RB, HS);
    // ids 0..3 use distinct indices; 4 and 5 collide with 0 and 1
    ids = '{29'h100, 29'h0a1, 29'h1f2, 29'h333, 29'h7f8, 29'h449};
    cur_fid = ids[0]; call_pulse = 0; clear = 0; ev = '0; rd_idx = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 6000; c++) begin
      if ($urandom_range(0, 9) == 0) begin
        // favour ids 0 and 2 so that they get hot
        int k;
        k = $urandom_range(0, 9);
        cur_fid    = ids[(k < 6) ? k : ((k % 2) ? 0 : 2)];
        call_pulse = $urandom_range(0, 1);
      end else call_pulse = 0;
      ev    = prof_events_t'($urandom);
      clear = (c % 700 == 699);
      e = '{ev.br_correct, ev.br_mispred, ev.dc_miss, ev.dc_hit, ev.ic_miss, ev.ic_hit};
      #1;
      exp_hot = m.step(cur_fid, call_pulse, e, clear);
      if (hot_pulse !== exp_hot || (exp_hot && hot_fid !== cur_fid)) begin
        failures++; $display("cycle %0d: hot_pulse %0b expected %0b", c, hot_pulse, exp_hot);
      end
      checks++;
      n_hot += exp_hot; n_clear += clear;
      @(negedge clk);
      if (c % 37 == 0 || clear) check_all();
    end
    $display("hot reports %0d, clears %0d, replacements %0d", n_hot, n_clear, m.replaces);
    if (n_hot == 0 || n_clear == 0) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
