// tb_fetch_throttle: a toy core fetches up to four instructions per cycle
// unless fetch is gated, and commits or squashes what it holds. MAXCOUNT is
// rewritten at random (including 0 and values above the counter range).
// Every cycle the gate must equal (model count >= model MAXCOUNT), and a
// write must take effect one cycle later.
module tb_fetch_throttle;
  localparam int unsigned COUNT_W = 8, FETCH_W = 4, COMMIT_W = 4;
  logic clk = 0, rst_n = 0;
  logic        maxcnt_we;
  logic [15:0] maxcnt_val;
  logic [2:0]  fetch_n, commit_n;
  logic [COUNT_W-1:0] squash_n, count, maxcount;
  logic fetch_gate;
  int checks = 0, failures = 0;
  int m_cnt = 0, m_max = 255, gated = 0, writes = 0;

  fetch_throttle #(.COUNT_W(COUNT_W), .FETCH_W(FETCH_W), .COMMIT_W(COMMIT_W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    maxcnt_we = 0; maxcnt_val = 0; fetch_n = 0; commit_n = 0; squash_n = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      bit exp_gate;
      exp_gate = (m_cnt >= m_max);
      if (fetch_gate !== exp_gate || count !== COUNT_W'(m_cnt) || maxcount !== COUNT_W'(m_max)) begin
        failures++;
        $display("cycle %0d: gate %0b cnt %0d max %0d, expected %0b %0d %0d",
                 c, fetch_gate, count, maxcount, exp_gate, m_cnt, m_max);
      end
      checks++;
      gated += exp_gate;
      fetch_n  = exp_gate ? 3'd0 : 3'($urandom_range(0, FETCH_W));
      if (m_cnt + fetch_n > 200) fetch_n = 0;     // toy core holds 200 instructions
      commit_n = 3'($urandom_range(0, (m_cnt < 2) ? m_cnt : 2));
      squash_n = ($urandom_range(0, 50) == 0) ? COUNT_W'(m_cnt - commit_n) : '0;
      maxcnt_we = ($urandom_range(0, 200) == 0);
      case ($urandom_range(0, 5))
        0:       maxcnt_val = 16'd0;
        1:       maxcnt_val = 16'($urandom_range(256, 65535));
        default: maxcnt_val = 16'($urandom_range(1, 96));
      endcase
      m_cnt = m_cnt + fetch_n - commit_n - squash_n;
      if (maxcnt_we) begin
        writes++;
        m_max = (maxcnt_val == 0) ? 1 : (maxcnt_val > 255) ? 255 : maxcnt_val;
      end
      @(negedge clk);
    end
    $display("gated cycles %0d, MAXCOUNT writes %0d", gated, writes);
    if (gated == 0 || writes == 0) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
