// tb_func_id_stack: random pushes and pops, deep enough to overflow a small
// stack and to pop it empty, against a queue model.
module tb_func_id_stack;
  import cdr_model_pkg::*;
  localparam int unsigned DEPTH = 8, W = 12;
  logic clk = 0, rst_n = 0;
  logic push, pop, top_valid, overflow;
  logic [W-1:0] push_id, top;
  logic [$clog2(DEPTH+1)-1:0] depth;
  int checks = 0, failures = 0, n_over = 0, n_empty_pop = 0, n_both = 0;
  stack_model m;

  func_id_stack #(.DEPTH(DEPTH), .W(W)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint unsigned v;
    int bias;
    m = new(DEPTH);
    push = 0; pop = 0; push_id = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    for (int c = 0; c < 20000; c++) begin
      bit exp_over;
      // compare state
      if (top_valid !== (m.q.size() != 0) || depth !== 4'(m.q.size()) ||
          (m.q.size() != 0 && top !== W'(m.q[$]))) begin
        failures++; $display("cycle %0d: depth %0d top %h, expected %0d", c, depth, top, m.q.size());
      end
      checks++;
      bias = ((c / 500) % 2) ? 70 : 30;           // phases of deep and shallow nesting
      push = ($urandom_range(0, 99) < bias);
      pop  = ($urandom_range(0, 99) < 100 - bias);
      push_id = W'($urandom);
      exp_over = push && !pop && m.q.size() == DEPTH;
      #1;
      if (overflow !== exp_over) begin failures++; $display("cycle %0d: overflow %0b", c, overflow); end
      checks++;
      if (push && pop && m.q.size() != 0) begin
        void'(m.pop(v)); void'(m.push(push_id)); n_both++;
      end else if (push) begin
        n_over += m.push(push_id);
      end else if (pop) begin
        if (!m.pop(v)) n_empty_pop++;
      end
      @(negedge clk);
    end
    $display("overflows %0d, empty pops %0d, push+pop %0d", n_over, n_empty_pop, n_both);
    if (n_over == 0 || n_empty_pop == 0 || n_both == 0) failures++;
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
