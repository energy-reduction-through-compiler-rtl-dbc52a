// tb_instr_counter: random fetch, commit and squash traffic against an
// integer model of the instruction count, checked every cycle.
module tb_instr_counter;
  localparam int unsigned COUNT_W = 6, FETCH_W = 4, COMMIT_W = 4;
  logic clk = 0, rst_n = 0;
  logic [2:0] fetch_n, commit_n;
  logic [COUNT_W-1:0] squash_n, count;
  int checks = 0, failures = 0, model = 0, hit_max = 0;

  instr_counter #(.COUNT_W(COUNT_W), .FETCH_W(FETCH_W), .COMMIT_W(COMMIT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    fetch_n = 0; commit_n = 0; squash_n = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < 5000; c++) begin
      @(negedge clk);
      if (count !== COUNT_W'(model)) begin
        failures++; $display("cycle %0d: count %0d, expected %0d", c, count, model);
      end
      checks++;
      fetch_n  = 3'($urandom_range(0, FETCH_W));
      commit_n = 3'($urandom_range(0, (model < COMMIT_W) ? model : COMMIT_W));
      squash_n = '0;
      if ($urandom_range(0, 30) == 0) squash_n = COUNT_W'($urandom_range(0, model - commit_n));
      // never let the environment overfill a 6-bit counter except near the end
      if (c < 4000 && model > 50) fetch_n = 0;
      if (c >= 4500) begin commit_n = 0; squash_n = 0; end
      model = model + fetch_n - commit_n - squash_n;
      if (model > (1 << COUNT_W) - 1) begin model = (1 << COUNT_W) - 1; hit_max++; end
    end
    @(negedge clk);
    if (count !== COUNT_W'(model)) failures++;
    checks++;
    $display("saturated %0d times", hit_max);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
